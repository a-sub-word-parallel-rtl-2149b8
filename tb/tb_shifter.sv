// tb_shifter: all shift operations and amounts on random operands, compared
// with a bit-by-bit model.
module tb_shifter;
  import dsp_pkg::*;
  shf_op_e op;
  logic [15:0] a, y, ey;
  logic [3:0] sh;
  int checks = 0, failures = 0;

  shifter dut (.op(op), .a(a), .sh(sh), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 400; i++) begin
        op = shf_op_e'(k); a = 16'($urandom); sh = 4'(i % 16); #1;
        for (int bit_i = 0; bit_i < 16; bit_i++) begin
          case (op)
            SHF_SLL: ey[bit_i] = (bit_i >= int'(sh)) ? a[bit_i - int'(sh)] : 1'b0;
            SHF_SRL: ey[bit_i] = (bit_i + int'(sh) < 16) ? a[bit_i + int'(sh)] : 1'b0;
            SHF_SRA: ey[bit_i] = (bit_i + int'(sh) < 16) ? a[bit_i + int'(sh)] : a[15];
            default: ey[bit_i] = a[(bit_i - int'(sh) + 16) % 16];
          endcase
        end
        checks++;
        if (y !== ey) begin failures++; $display("FAIL %s %h by %0d: %h exp %h", op.name(), a, sh, y, ey); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
