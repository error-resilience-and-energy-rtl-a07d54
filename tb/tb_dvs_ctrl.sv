// tb_dvs_ctrl: supply schedule controller. Programs a schedule, requests iterations like
// the decoder does (hold iter_req until iter_go) and checks, against a reference walk of
// the schedule: the level used per iteration (rising only within a codeword, table entry
// at iteration 1), the stall of SWITCH_CYC cycles per level change and none without one,
// and the switch counter.
module tb_dvs_ctrl;
  import ldpc_pkg::*;

  localparam int SW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     cfg_we, iter_req, iter_go, switching;
  logic [$clog2(L_MAX)-1:0] cfg_iter, iter_idx;
  logic [LVL_W-1:0]         cfg_level, vdd_sel;
  logic [15:0]              switch_cnt;

  dvs_ctrl #(.LMAX(L_MAX), .NLV(NLEVEL), .SWITCH_CYC(SW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sched [L_MAX];
    int cur, nsw;
    cfg_we = 0; iter_req = 0; cfg_iter = '0; iter_idx = '0; cfg_level = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(vdd_sel == LVL_W'(VDD_1V00), "nominal level after reset");
    cur = int'(VDD_1V00);
    nsw = 0;
    for (int cw = 0; cw < 6; cw++) begin
      // schedule: cw 0 default table, then random (not necessarily monotone) tables
      if (cw == 0) for (int i = 0; i < L_MAX; i++) sched[i] = int'(VDD_1V00);
      else begin
        for (int i = 0; i < L_MAX; i++) begin
          sched[i] = int'($urandom() % NLEVEL);
          @(negedge clk);
          cfg_we = 1; cfg_iter = ($clog2(L_MAX))'(i); cfg_level = LVL_W'(sched[i]);
        end
        @(negedge clk) cfg_we = 0;
      end
      for (int it = 0; it < L_MAX; it++) begin
        int target, wait_cyc;
        target = (it == 0 || sched[it] > cur) ? sched[it] : cur;
        @(negedge clk);
        iter_req = 1; iter_idx = ($clog2(L_MAX))'(it);
        wait_cyc = 0;
        #1;
        while (!iter_go) begin
          @(negedge clk);
          wait_cyc++;
          #1;
          if (wait_cyc > 10) break;
        end
        check(wait_cyc == ((target != cur) ? SW : 0),
              $sformatf("cw %0d it %0d: stall %0d (level %0d -> %0d)", cw, it, wait_cyc, cur, target));
        check(int'(vdd_sel) == target, $sformatf("cw %0d it %0d: level %0d exp %0d", cw, it, vdd_sel, target));
        if (target != cur) nsw++;
        cur = target;
        @(negedge clk) iter_req = 0;
        if ($urandom() % 5 == 0) break;   // early termination of this codeword
      end
      check(int'(switch_cnt) == nsw, $sformatf("switch count %0d exp %0d", switch_cnt, nsw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
