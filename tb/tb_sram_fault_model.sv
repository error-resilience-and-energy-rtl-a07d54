// tb_sram_fault_model: bit-flip model of the APP SRAM. With flip probabilities of 0, 1/2
// and 1 (thresholds in units of 2^-64) and the 1e-11 nominal rate, checks per read: data
// passes unchanged at 0 and at the nominal rate over a short run, every bit inverts at 1,
// the fraction of flipped bits at 1/2 lies within 0.45..0.55, the pattern holds between
// reads, and flip_total equals the number of inverted bits seen.
module tb_sram_fault_model;
  import ldpc_pkg::*;

  localparam int W = P * APP_W, NP = NSLOT;
  localparam logic [63:0] THR [NLEVEL] = '{64'd0, 64'h8000_0000_0000_0000,
                                           64'hFFFF_FFFF_FFFF_FFFF, 64'd0, 64'd184467440};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [LVL_W-1:0] vdd_sel;
  logic [NP-1:0]    rd_en;
  logic [W-1:0]     din  [NP];
  logic [W-1:0]     dout [NP];
  logic [31:0]      flip_total;

  sram_fault_model #(.NPORT(NP), .WIDTH(W), .NLV(NLEVEL), .FLIP_THR(THR)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int seen;
    seen = 0;
    vdd_sel = '0; rd_en = '0;
    for (int p = 0; p < NP; p++) din[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int lv = 0; lv < NLEVEL; lv++) begin
      int nbits, nflip;
      nbits = 0;
      nflip = 0;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        vdd_sel = LVL_W'(lv);
        rd_en = NP'($urandom());
        for (int p = 0; p < NP; p++)
          for (int i = 0; i < W; i += 32) din[p][i +: 32] = $urandom();
        @(negedge clk);
        for (int p = 0; p < NP; p++) if (rd_en[p]) begin
          logic [W-1:0] d0, pat;
          d0  = din[p];
          pat = dout[p] ^ din[p];
          nbits += W;
          nflip += $countones(pat);
          seen  += $countones(pat);
          // the pattern holds while the port does not read
          din[p] = ~din[p];
          #1;
          check((dout[p] ^ din[p]) == pat, "pattern held between reads");
          din[p] = d0;
          if (lv == 0 || lv == 3) check(pat == '0, "no flips at probability 0");
          if (lv == 2) check(pat == '1, "all bits flip at probability 1");
        end
        rd_en = '0;
      end
      if (lv == 1) check(nflip > nbits * 45 / 100 && nflip < nbits * 55 / 100,
                         $sformatf("flip fraction %0d / %0d", nflip, nbits));
      if (lv == 4) check(nflip == 0, "no flips at 1e-11 in a short run");
    end
    @(negedge clk);
    check(int'(flip_total) == seen, $sformatf("flip_total %0d exp %0d", flip_total, seen));
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
