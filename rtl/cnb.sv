// cnb: check node block, the merged variable node unit (VFU) and check node unit (CFU)
// for one check node of the layer being processed. The decoder has P = 21 of them.
//
// Layered min-sum. For each non-zero circulant e of the layer the CNB receives the APP
// value lam_e of the connected bit (one per slot per cycle) and works in two phases:
//   read phase  (acc_en):  Q_e = lam_e - R_old_e              (VFU: remove own message)
//                          min1, min2, index of min1, sign product of the Q_e   (CFU)
//                          and the parity of the hard decisions sign(lam_e)
//   write phase (wr_base): R_new_e = sign * (e == idx ? min2 : min1)
//                          lam_new_e = sat(Q_e + R_new_e)         (VFU: new APP value)
// The Q_e of the layer are kept in a 16-entry buffer between the phases. The check
// messages of every layer are stored compressed (min1, min2, index, one sign per entry)
// in flip-flops inside the CNB; they read as zero after `clear` (first iteration).
// Magnitudes of variable-to-check values saturate at 15 (5-bit messages); APP values
// saturate symmetrically at +-63.
//
// Timing: accumulation registers update on the clock edge of an acc_en cycle; acc_first
// marks the first read cycle of a layer and restarts the accumulation. lam_out,
// sign_change and parity are combinational from registers and the write-phase inputs.
// `commit` (one cycle in the write phase) stores the new compressed message of `layer`.
//
// The min-sum equations and the merging of VFU and CFU into CNBs follow the source; the
// compressed message storage, the Q buffer and the saturation widths are this design's
// choices (the source does not describe the CNB's insides).
module cnb
  import ldpc_pkg::*;
#(
  parameter int NS      = ldpc_pkg::NSLOT,   // slots per cycle
  parameter int DCMAX   = ldpc_pkg::MAX_DC,  // largest check degree
  parameter int NLAYER  = ldpc_pkg::NB_ROW   // layers whose messages are stored
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,          // forget all check messages
  input  logic [$clog2(NLAYER)-1:0]  layer,
  // read phase
  input  logic                       acc_en,
  input  logic                       acc_first,
  input  logic [$clog2(DCMAX)-1:0]   acc_base,       // entry index of slot 0
  input  logic [NS-1:0]              acc_slot_vld,
  input  app_t                       lam_in [NS],
  // write phase
  input  logic [$clog2(DCMAX)-1:0]   wr_base,
  input  logic [NS-1:0]              wr_slot_vld,
  input  logic                       commit,
  output app_t                       lam_out [NS],
  output logic                       sign_change,    // a hard decision flips in this write cycle
  output logic                       parity          // XOR of the hard decisions read this layer
);

  localparam int IW = $clog2(DCMAX);

  // stored check messages, per layer
  mag_t              st_m1  [NLAYER];
  mag_t              st_m2  [NLAYER];
  logic [IW-1:0]     st_idx [NLAYER];
  logic [DCMAX-1:0]  st_sgn [NLAYER];
  logic [NLAYER-1:0] st_vld;

  // layer buffer and accumulators
  q_t                qbuf [DCMAX];
  logic [DCMAX-1:0]  hd;
  mag_t              a_m1, a_m2;
  logic [IW-1:0]     a_idx;
  logic              a_sp, a_par;

  function automatic mag_t sat_mag(input q_t q);
    q_t m;
    m = (q < 0) ? -q : q;
    return (m > q_t'(MAG_MAX)) ? mag_t'(MAG_MAX) : mag_t'(m);
  endfunction

  function automatic app_t sat_app(input logic signed [Q_W:0] v);
    if (v > (Q_W+1)'(APP_MAX))  return app_t'(APP_MAX);
    if (v < -(Q_W+1)'(APP_MAX)) return app_t'(-APP_MAX);
    return app_t'(v);
  endfunction

  // ---------------- read phase: VFU subtract, CFU min search ----------------
  q_t            q_in [NS];
  logic [IW+1:0] e_in [NS];        // entry index of each slot

  for (genvar k = 0; k < NS; k++) begin : g_eidx
    assign e_in[k] = (IW+2)'(acc_base) + (IW+2)'(k);
  end
  mag_t          t_m1, t_m2;
  logic [IW-1:0] t_idx;
  logic          t_sp, t_par;

  always_comb begin
    t_m1  = acc_first ? mag_t'(MAG_MAX) : a_m1;
    t_m2  = acc_first ? mag_t'(MAG_MAX) : a_m2;
    t_idx = acc_first ? '0 : a_idx;
    t_sp  = acc_first ? 1'b0 : a_sp;
    t_par = acc_first ? 1'b0 : a_par;
    q_in  = '{default: '0};
    for (int k = 0; k < NS; k++) begin
      mag_t          r_mag;
      logic          r_neg;
      q_t            r_old;
      mag_t          mg;
      r_old   = '0;
      r_mag   = '0;
      r_neg   = 1'b0;
      mg      = '0;
      if (int'(e_in[k]) < DCMAX && st_vld[layer]) begin
        r_mag = (IW'(e_in[k]) == st_idx[layer]) ? st_m2[layer] : st_m1[layer];
        r_neg = st_sgn[layer][IW'(e_in[k])];
        r_old = r_neg ? -q_t'(r_mag) : q_t'(r_mag);
      end
      q_in[k] = q_t'(lam_in[k]) - r_old;
      if (acc_slot_vld[k]) begin
        mg = sat_mag(q_in[k]);
        if (mg < t_m1) begin
          t_m2  = t_m1;
          t_m1  = mg;
          t_idx = IW'(e_in[k]);
        end else if (mg < t_m2) begin
          t_m2 = mg;
        end
        t_sp  = t_sp ^ (q_in[k] < 0);
        t_par = t_par ^ lam_in[k][APP_W-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_m1  <= '0;
      a_m2  <= '0;
      a_idx <= '0;
      a_sp  <= 1'b0;
      a_par <= 1'b0;
      hd    <= '0;
      for (int e = 0; e < DCMAX; e++) qbuf[e] <= '0;
    end else if (acc_en) begin
      a_m1  <= t_m1;
      a_m2  <= t_m2;
      a_idx <= t_idx;
      a_sp  <= t_sp;
      a_par <= t_par;
      for (int k = 0; k < NS; k++)
        if (acc_slot_vld[k] && int'(e_in[k]) < DCMAX) begin
          qbuf[IW'(e_in[k])] <= q_in[k];
          hd[IW'(e_in[k])]   <= lam_in[k][APP_W-1];
        end
    end
  end

  assign parity = a_par;

  // ---------------- write phase: new check messages and APP values ----------------
  always_comb begin
    sign_change = 1'b0;
    for (int k = 0; k < NS; k++) begin
      int   e;
      mag_t mg;
      logic ng;
      q_t   qv;
      logic signed [Q_W:0] sum;
      e  = int'(wr_base) + k;
      qv = (e < DCMAX) ? qbuf[e] : '0;
      mg = (IW'(e) == a_idx) ? a_m2 : a_m1;
      ng = a_sp ^ (qv < 0);
      sum = (Q_W+1)'(qv) + (ng ? -(Q_W+1)'(mg) : (Q_W+1)'(mg));
      lam_out[k] = sat_app(sum);
      if (wr_slot_vld[k] && e < DCMAX && (hd[e] != lam_out[k][APP_W-1]))
        sign_change = 1'b1;
    end
  end

  // ---------------- compressed check message store ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_vld <= '0;
      for (int l = 0; l < NLAYER; l++) begin
        st_m1[l]  <= '0;
        st_m2[l]  <= '0;
        st_idx[l] <= '0;
        st_sgn[l] <= '0;
      end
    end else if (clear) begin
      st_vld <= '0;
    end else if (commit) begin
      st_vld[layer] <= 1'b1;
      st_m1[layer]  <= a_m1;
      st_m2[layer]  <= a_m2;
      st_idx[layer] <= a_idx;
      for (int e = 0; e < DCMAX; e++)
        st_sgn[layer][e] <= a_sp ^ (qbuf[e] < 0);
    end
  end

endmodule
