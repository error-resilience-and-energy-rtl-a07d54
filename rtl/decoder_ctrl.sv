// decoder_ctrl: top controller of the slot-layered decoder.
//
// Runs one codeword at a time: load, iterations, readout.
//   S_LOAD    the I/O block writes the channel LLRs into the APP RAM; every block column
//             is then stored in natural order (rotation 0). The CNBs forget their check
//             messages when the last beat arrives.
//   S_REQ     asks the DVS controller for the supply level of the coming iteration and
//             waits for iter_go (a level change stalls the decoder for the switch time).
//   S_RD      layer by layer, ceil(dc/3) cycles: in each, slot k reads the block column of
//             entry 3*cyc+k of the layer. The read offset is (shift - rotation stored for
//             that column) mod P; it is registered with the read and steers the slot's
//             barrel shifter when the data returns one cycle later.
//   S_RWAIT   one cycle for the last read data to be accumulated.
//   S_WR      ceil(dc/3) cycles: slot k writes the new APP values of entry 3*cyc+k back to
//             the same column, unrotated; the column's stored rotation becomes the entry's
//             shift. The first write cycle commits the layer's new check messages.
//   S_ITEND   end of iteration. Decoding stops when, during the whole iteration, every
//             layer's checks had even parity on the values read and no write changed a
//             hard decision (then the hard decisions form a codeword), or after LMAX
//             iterations.
//   S_OUT     the I/O block reads the columns out; the offset (P - rotation) mod P
//             returns each to natural order.
// Cycles per iteration without a voltage switch: sum over layers of (2*ceil(dc/3)+1),
// plus 2 (S_REQ, S_ITEND): 72 for the default code.
//
// The layer/slot sequencing, offset-shift bookkeeping and the stopping rule in terms of
// satisfied parity checks or L_max iterations follow the source; the state encoding, the
// non-overlapped read/write phases and the exact stopping test are this design's choices.
module decoder_ctrl
  import ldpc_pkg::*;
#(
  parameter int LMAX = ldpc_pkg::L_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  // I/O block
  output logic             load_en,
  input  logic             load_done,
  output logic             out_start,
  input  logic             out_rd_en,
  input  logic [COL_W-1:0] out_rd_col,
  input  logic             out_done,
  // DVS controller
  output logic             iter_req,
  output logic [$clog2(LMAX)-1:0] iter_idx,
  input  logic             iter_go,
  // APP RAM, decoding ports
  output logic [NSLOT-1:0] rd_en,
  output logic [COL_W-1:0] rd_addr [NSLOT],
  output logic [NSLOT-1:0] wr_en,
  output logic [COL_W-1:0] wr_addr [NSLOT],
  // barrel shifters, aligned with the returning read data
  output logic [SH_W-1:0]  rot_off [NSLOT],
  // CNBs
  output logic             cnb_clear,
  output logic [LAYER_W-1:0] layer,
  output logic             acc_en,
  output logic             acc_first,
  output logic [IDX_W-1:0] acc_base,
  output logic [NSLOT-1:0] acc_slot_vld,
  output logic [IDX_W-1:0] wr_base,
  output logic [NSLOT-1:0] wr_slot_vld,
  output logic             commit,
  input  logic             any_parity,
  input  logic             any_sign_change,
  // status
  output logic             busy,
  output logic             dec_done,
  output logic [ITER_W-1:0] dec_iters,
  output logic             dec_converged
);

  typedef enum logic [2:0] {
    S_LOAD, S_REQ, S_RD, S_RWAIT, S_WR, S_ITEND, S_OUT
  } state_e;

  state_e           st;
  logic [CYC_W-1:0] cyc;
  logic [ITER_W-1:0] iter;
  logic             clean;
  logic [SH_W-1:0]  rot [NB_COL];
  entry_t           ent [NSLOT];
  logic [CYC_W-1:0] ncyc;

  always_comb begin
    ncyc = CYC_W'(layer_cycles(int'(layer)) - 1);
    for (int k = 0; k < NSLOT; k++)
      ent[k] = layer_entry(int'(layer), int'(cyc) * NSLOT + k);
  end

  function automatic logic [SH_W-1:0] mod_sub(input logic [SH_W-1:0] a, input logic [SH_W-1:0] b);
    return (a >= b) ? a - b : SH_W'(int'(a) + P - int'(b));
  endfunction

  // ---- outputs decoded from the state ----
  always_comb begin
    load_en     = (st == S_LOAD);
    iter_req    = (st == S_REQ);
    iter_idx    = iter[$clog2(LMAX)-1:0];
    busy        = (st != S_LOAD);
    commit      = (st == S_WR) && (cyc == '0);
    wr_base     = IDX_W'(int'(cyc) * NSLOT);
    for (int k = 0; k < NSLOT; k++) begin
      rd_en[k]       = (st == S_RD) && ent[k].valid;
      rd_addr[k]     = ent[k].col;
      wr_en[k]       = (st == S_WR) && ent[k].valid;
      wr_addr[k]     = ent[k].col;
      wr_slot_vld[k] = (st == S_WR) && ent[k].valid;
    end
  end

  // ---- read pipeline: control for the data returning next cycle ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_en       <= 1'b0;
      acc_first    <= 1'b0;
      acc_base     <= '0;
      acc_slot_vld <= '0;
      for (int k = 0; k < NSLOT; k++) rot_off[k] <= '0;
    end else begin
      acc_en    <= (st == S_RD);
      acc_first <= (st == S_RD) && (cyc == '0);
      acc_base  <= IDX_W'(int'(cyc) * NSLOT);
      for (int k = 0; k < NSLOT; k++) begin
        acc_slot_vld[k] <= (st == S_RD) && ent[k].valid;
        rot_off[k]      <= mod_sub(ent[k].shift, rot[ent[k].col]);
      end
      if (out_rd_en) rot_off[0] <= mod_sub('0, rot[out_rd_col]);
    end
  end

  // ---- main sequencer ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= S_LOAD;
      cyc           <= '0;
      layer         <= '0;
      iter          <= '0;
      clean         <= 1'b1;
      cnb_clear     <= 1'b0;
      out_start     <= 1'b0;
      dec_done      <= 1'b0;
      dec_iters     <= '0;
      dec_converged <= 1'b0;
      for (int c = 0; c < NB_COL; c++) rot[c] <= '0;
    end else begin
      cnb_clear <= 1'b0;
      out_start <= 1'b0;
      dec_done  <= 1'b0;
      unique case (st)
        S_LOAD: if (load_done) begin
          for (int c = 0; c < NB_COL; c++) rot[c] <= '0;
          cnb_clear <= 1'b1;
          iter      <= '0;
          st        <= S_REQ;
        end
        S_REQ: if (iter_go) begin
          layer <= '0;
          cyc   <= '0;
          clean <= 1'b1;
          st    <= S_RD;
        end
        S_RD: begin
          if (cyc == ncyc) begin
            cyc <= '0;
            st  <= S_RWAIT;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_RWAIT: st <= S_WR;
        S_WR: begin
          for (int k = 0; k < NSLOT; k++)
            if (ent[k].valid) rot[ent[k].col] <= ent[k].shift;
          if (any_sign_change || (cyc == '0 && any_parity)) clean <= 1'b0;
          if (cyc == ncyc) begin
            cyc <= '0;
            if (layer == LAYER_W'(NB_ROW - 1)) st <= S_ITEND;
            else begin
              layer <= layer + 1'b1;
              st    <= S_RD;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_ITEND: begin
          if (clean || iter == ITER_W'(LMAX - 1)) begin
            dec_iters     <= iter + 1'b1;
            dec_converged <= clean;
            out_start     <= 1'b1;
            st            <= S_OUT;
          end else begin
            iter <= iter + 1'b1;
            st   <= S_REQ;
          end
        end
        S_OUT: if (out_done) begin
          dec_done <= 1'b1;
          st       <= S_LOAD;
        end
        default: st <= S_LOAD;
      endcase
    end
  end

endmodule
