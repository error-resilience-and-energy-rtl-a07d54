// dvs_ctrl: per-iteration supply level of the APP RAM (unequal error protection across
// iterations by dynamic voltage scaling).
//
// A schedule table holds one supply level per decoding iteration (iteration 1 .. L_MAX,
// stored at index 0 .. L_MAX-1). It is computed off-line (density evolution and a greedy
// search that trades memory error rate against energy per iteration) and written through
// the cfg port; after reset every entry holds the nominal level (1.0 V), which makes the
// decoder the conventional one. Table III style schedules, e.g. 0.75 V for iteration 1
// and 0.8 V after, are written as {1, 2, 2, ...}.
//
// Before each iteration the decoder raises iter_req with the iteration index and waits
// for iter_go. The level used for iteration i > 0 is max(table[i], level now): the level
// only rises within a codeword, so K levels need at most K-1 switches. Iteration 0 of
// a codeword takes table[0] directly. When the level changes, vdd_sel changes at once and
// iter_go is withheld for SWITCH_CYC cycles (settling of the supply; the source says a
// switch takes one or two cycles); otherwise iter_go is given in the request cycle.
// switch_cnt counts the level changes since reset.
module dvs_ctrl
  import ldpc_pkg::*;
#(
  parameter int LMAX       = ldpc_pkg::L_MAX,
  parameter int NLV        = ldpc_pkg::NLEVEL,
  parameter int SWITCH_CYC = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(LMAX)-1:0]   cfg_iter,
  input  logic [$clog2(NLV)-1:0]    cfg_level,
  input  logic                      iter_req,
  input  logic [$clog2(LMAX)-1:0]   iter_idx,
  output logic                      iter_go,
  output logic [$clog2(NLV)-1:0]    vdd_sel,
  output logic                      switching,
  output logic [15:0]               switch_cnt
);

  localparam int LW = $clog2(NLV);
  localparam int CW = (SWITCH_CYC > 1) ? $clog2(SWITCH_CYC) : 1;

  logic [LW-1:0] tab [LMAX];
  logic [LW-1:0] cur, target, want;
  logic [CW-1:0] cnt;

  always_comb begin
    want   = tab[iter_idx];
    target = (iter_idx == '0 || want > cur) ? want : cur;
  end

  assign switching = (cnt != '0);
  assign iter_go   = iter_req && !switching && (target == cur);
  assign vdd_sel   = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LMAX; i++) tab[i] <= LW'(NLV - 1);
      cur        <= LW'(NLV - 1);
      cnt        <= '0;
      switch_cnt <= '0;
    end else begin
      if (cfg_we) tab[cfg_iter] <= cfg_level;
      if (switching) begin
        cnt <= cnt - 1'b1;
      end else if (iter_req && target != cur) begin
        cur        <= target;
        cnt        <= CW'(SWITCH_CYC - 1);
        switch_cnt <= switch_cnt + 1'b1;
      end
    end
  end

  // A switch that needs no settling cycle would give iter_go while the level moves.
  initial assert (SWITCH_CYC >= 1) else $error("dvs_ctrl: SWITCH_CYC must be at least 1");

endmodule
