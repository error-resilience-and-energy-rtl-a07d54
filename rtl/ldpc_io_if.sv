// ldpc_io_if: codeword input and decoded-bit output of the decoder.
//
// Input: a codeword is delivered as NB_COL beats of P channel LLRs (block column c in
// beat c, bit b of the column in in_llr[b]; LLR > 0 favours bit 0). While load_en is
// high in_ready is high; each accepted beat becomes a write of the sign-extended LLRs to
// APP RAM word c (load_we/load_addr/load_word). load_done pulses with the last beat.
//
// Output: out_start begins the readout. For c = 0 .. NB_COL-1 the block issues one APP
// RAM read of word c per cycle (out_rd_en/out_rd_col); the word comes back one cycle later
// already rotated into natural bit order (out_word) and leaves as hard decisions
// (out_bits[b] = 1 when the APP value is negative) with out_valid, out_col and out_last.
// out_done pulses with the last beat. There is no back-pressure on the output.
//
// The source shows interface logic on the chip but does not describe it; this beat
// format and handshake are this design's choice.
//
// in_ready, load_word and out_bits are combinational functions of one input each
// (load_en, in_llr, out_word): the block only re-formats, so these outputs are wires.
module ldpc_io_if
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // channel side
  input  logic             in_valid,
  output logic             in_ready,
  input  llr_t             in_llr [P],
  output logic             out_valid,
  output logic [COL_W-1:0] out_col,
  output logic             out_last,
  output logic [P-1:0]     out_bits,
  // decoder side
  input  logic             load_en,
  output logic             load_we,
  output logic [COL_W-1:0] load_addr,
  output app_word_t        load_word,
  output logic             load_done,
  input  logic             out_start,
  output logic             out_rd_en,
  output logic [COL_W-1:0] out_rd_col,
  input  app_word_t        out_word,
  output logic             out_done
);

  // ---------------- load ----------------
  logic [COL_W-1:0] ld_cnt;

  assign in_ready  = load_en;
  assign load_we   = load_en && in_valid;
  assign load_addr = ld_cnt;
  assign load_done = load_we && (ld_cnt == COL_W'(NB_COL - 1));

  for (genvar b = 0; b < P; b++) begin : g_ext
    assign load_word[b*APP_W +: APP_W] = app_t'(in_llr[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ld_cnt <= '0;
    else if (load_done) ld_cnt <= '0;
    else if (load_we)   ld_cnt <= ld_cnt + 1'b1;
  end

  // ---------------- readout ----------------
  logic             rd_act;
  logic [COL_W-1:0] rd_cnt;
  logic             ret_vld;
  logic [COL_W-1:0] ret_col;

  assign out_rd_en  = rd_act;
  assign out_rd_col = rd_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act  <= 1'b0;
      rd_cnt  <= '0;
      ret_vld <= 1'b0;
      ret_col <= '0;
    end else begin
      ret_vld <= rd_act;
      ret_col <= rd_cnt;
      if (out_start) begin
        rd_act <= 1'b1;
        rd_cnt <= '0;
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == COL_W'(NB_COL - 1)) rd_act <= 1'b0;
      end
    end
  end

  assign out_valid = ret_vld;
  assign out_col   = ret_col;
  assign out_last  = ret_vld && (ret_col == COL_W'(NB_COL - 1));
  assign out_done  = out_last;

  for (genvar b = 0; b < P; b++) begin : g_hd
    assign out_bits[b] = out_word[b*APP_W + APP_W - 1];
  end

endmodule
