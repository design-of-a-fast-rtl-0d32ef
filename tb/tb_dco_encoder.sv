`timescale 1ps / 1fs
// tb_dco_encoder: exhaustive check of the DCO code to thermometer encoder.
// For every one of the 2048 codes the coarse code must be all ones shifted
// left by dco_code[10:5] (zeros below the coarse value) and the fine code
// must hold dco_code[4:0] ones from bit 0 up.
module tb_dco_encoder;
  import adpll_pkg::*;

  dco_code_t           code;
  logic [N_COARSE-1:0] coarse, exp_coarse;
  logic [N_FINE-1:0]   fine, exp_fine;
  int checks = 0, failures = 0;

  dco_encoder dut (.dco_code(code), .coarse(coarse), .fine(fine));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2048; c++) begin
      code = dco_code_t'(c);
      #10;
      exp_coarse = {N_COARSE{1'b1}} << (c >> 5);
      exp_fine   = N_FINE'((64'd1 << (c & 31)) - 64'd1);
      checks++;
      if (coarse !== exp_coarse) begin
        failures++;
        $display("code %0d: coarse %h expected %h", c, coarse, exp_coarse);
      end
      checks++;
      if (fine !== exp_fine) begin
        failures++;
        $display("code %0d: fine %h expected %h", c, fine, exp_fine);
      end
    end
    // The two examples of the description: coarse value 2 and fine value 29.
    code = {6'd2, 5'd29};
    #10;
    checks++;
    if (!(coarse[1:0] == 2'b00 && &coarse[62:2] && &fine[28:0] && fine[30:29] == 2'b00)) begin
      failures++;
      $display("example pattern wrong: coarse %h fine %h", coarse, fine);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
