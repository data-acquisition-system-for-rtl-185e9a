// Self-checking testbench of tr_select: every mode against every pair of
// discriminator outputs.
module tb_tr_select;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic amp_hit, miw_hit, tr;
  tr_mode_e mode;
  int checks = 0, failures = 0;
  tr_select dut (.*);
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int m = 0; m < 4; m++)
      for (int a = 0; a < 2; a++)
        for (int w = 0; w < 2; w++) begin
          bit exp_tr;
          mode = tr_mode_e'(m); amp_hit = a[0]; miw_hit = w[0];
          #1ns;
          exp_tr = (m == 1) ? a[0] : (m == 2) ? w[0] : (m == 3) ? (a[0] & w[0]) : 1'b0;
          checks++;
          if (tr != exp_tr) begin failures++; $display("FAIL m=%0d a=%0d w=%0d", m, a, w); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
