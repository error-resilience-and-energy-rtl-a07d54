// tb_barrel_shifter: every shift amount 0..P-1 on random block columns, compared with a
// direct rotation out[a] = in[(a + shift) mod P] computed element by element.
module tb_barrel_shifter;
  import ldpc_pkg::*;

  logic [P*APP_W-1:0] din, dout;
  logic [SH_W-1:0]    shift;

  barrel_shifter #(.P(P), .W(APP_W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int s = 0; s < P; s++) begin
        logic [P*APP_W-1:0] expv;
        for (int a = 0; a < P; a++) din[a*APP_W +: APP_W] = APP_W'($urandom());
        shift = SH_W'(s);
        for (int a = 0; a < P; a++) expv[a*APP_W +: APP_W] = din[((a + s) % P)*APP_W +: APP_W];
        #1;
        checks++;
        if (dout !== expv) begin
          failures++;
          $display("FAIL: shift %0d", s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
