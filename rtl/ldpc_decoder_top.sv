// ldpc_decoder_top: slot-layered min-sum LDPC decoder for the 672-bit rate-13/16 code of
// IEEE 802.11ad, with a per-iteration supply schedule for its APP memory.
//
// Datapath: the APP RAM holds one word of 21 APP values per block column. In every
// decoding cycle three slots each read one block column, rotate it with their barrel
// shifter so that element i belongs to check i of the current layer, and hand element i
// to check node block i (21 CNBs). In the write phase the CNBs return the updated APP
// values, which are written back without rotation; the controller remembers each
// column's rotation and folds it into the next read's shift (offset shifts).
// The supply level of the APP RAM is chosen per iteration by dvs_ctrl from a
// programmable schedule (low voltage, high error rate in early iterations; nominal
// later). vdd_sel leaves the block to drive the supply switches.
//
// MODEL_MEM_ERRORS = 1 inserts sram_fault_model (behavioural, simulation only) on the RAM
// read data, so that reads at a scaled level see the bit errors of that level. With the
// default 0 the design is synthesizable and the RAM is error free; mem_flips (the model's
// count of flipped bits) is then tied to 0.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   in_valid/in_ready/in_llr   32 beats of 21 LLRs (block column c in beat c)
//   out_valid/out_col/out_last/out_bits   32 beats of 21 hard decisions, natural order
//   cfg_we/cfg_iter/cfg_level  write schedule entry: level for iteration cfg_iter+1
//   dec_done (pulse after the last output beat), dec_iters, dec_converged
//   vdd_sel, dvs_stall, switch_cnt: supply level, switch settling, level changes so far
// Latency: 32 load cycles, 72 cycles per iteration (+2 per level change), 33 output
// cycles.
module ldpc_decoder_top
  import ldpc_pkg::*;
#(
  parameter int  LMAX             = ldpc_pkg::L_MAX,
  parameter int  SWITCH_CYC       = 2,
  parameter bit  MODEL_MEM_ERRORS = 1'b0,
  parameter ldpc_pkg::flip_thr_t FLIP_THR = ldpc_pkg::FLIP_THR_DEFAULT  // used by the error model only
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  llr_t              in_llr [P],
  output logic              out_valid,
  output logic [COL_W-1:0]  out_col,
  output logic              out_last,
  output logic [P-1:0]      out_bits,
  input  logic              cfg_we,
  input  logic [$clog2(LMAX)-1:0] cfg_iter,
  input  logic [LVL_W-1:0]  cfg_level,
  output logic              busy,
  output logic              dec_done,
  output logic [ITER_W-1:0] dec_iters,
  output logic              dec_converged,
  output logic [LVL_W-1:0]  vdd_sel,
  output logic              dvs_stall,
  output logic [15:0]       switch_cnt,
  output logic [31:0]       mem_flips
);

  // ---------------- I/O ----------------
  logic             load_en, load_we, load_done;
  logic [COL_W-1:0] load_addr;
  app_word_t        load_word;
  logic             out_start, out_rd_en, out_done;
  logic [COL_W-1:0] out_rd_col;
  app_word_t        rot_word [NSLOT];

  ldpc_io_if u_io (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_llr,
    .out_valid, .out_col, .out_last, .out_bits,
    .load_en, .load_we, .load_addr, .load_word, .load_done,
    .out_start, .out_rd_en, .out_rd_col,
    .out_word (rot_word[0]),
    .out_done
  );

  // ---------------- controller ----------------
  logic                      iter_req, iter_go;
  logic [$clog2(LMAX)-1:0]   iter_idx;
  logic [NSLOT-1:0]          c_rd_en, c_wr_en;
  logic [COL_W-1:0]          c_rd_addr [NSLOT];
  logic [COL_W-1:0]          c_wr_addr [NSLOT];
  logic [SH_W-1:0]           rot_off [NSLOT];
  logic                      cnb_clear, acc_en, acc_first, commit;
  logic [LAYER_W-1:0]        layer;
  logic [IDX_W-1:0]          acc_base, wr_base;
  logic [NSLOT-1:0]          acc_slot_vld, wr_slot_vld;
  logic [P-1:0]              par, sgc;

  decoder_ctrl #(.LMAX(LMAX)) u_ctrl (
    .clk, .rst_n,
    .load_en, .load_done, .out_start, .out_rd_en, .out_rd_col, .out_done,
    .iter_req, .iter_idx, .iter_go,
    .rd_en (c_rd_en), .rd_addr (c_rd_addr), .wr_en (c_wr_en), .wr_addr (c_wr_addr),
    .rot_off,
    .cnb_clear, .layer, .acc_en, .acc_first, .acc_base, .acc_slot_vld,
    .wr_base, .wr_slot_vld, .commit,
    .any_parity (|par), .any_sign_change (|sgc),
    .busy, .dec_done, .dec_iters, .dec_converged
  );

  // ---------------- supply schedule ----------------
  dvs_ctrl #(.LMAX(LMAX), .NLV(NLEVEL), .SWITCH_CYC(SWITCH_CYC)) u_dvs (
    .clk, .rst_n,
    .cfg_we, .cfg_iter, .cfg_level,
    .iter_req, .iter_idx, .iter_go,
    .vdd_sel, .switching (dvs_stall), .switch_cnt
  );

  // ---------------- APP RAM ----------------
  logic [NSLOT-1:0] m_rd_en, m_wr_en;
  logic [COL_W-1:0] m_rd_addr [NSLOT];
  logic [COL_W-1:0] m_wr_addr [NSLOT];
  app_word_t        m_wr_data [NSLOT];
  app_word_t        m_rd_data [NSLOT];
  app_word_t        rd_word   [NSLOT];
  app_word_t        cnb_word  [NSLOT];

  always_comb begin
    m_rd_en   = c_rd_en;
    m_rd_addr = c_rd_addr;
    m_wr_en   = c_wr_en;
    m_wr_addr = c_wr_addr;
    m_wr_data = cnb_word;
    if (out_rd_en) begin
      m_rd_en[0]   = 1'b1;
      m_rd_addr[0] = out_rd_col;
    end
    if (load_we) begin
      m_wr_en[0]   = 1'b1;
      m_wr_addr[0] = load_addr;
      m_wr_data[0] = load_word;
    end
  end

  app_ram #(.DEPTH(NB_COL), .WIDTH(P * APP_W), .NPORT(NSLOT)) u_app_ram (
    .clk,
    .rd_en (m_rd_en), .rd_addr (m_rd_addr), .rd_data (m_rd_data),
    .wr_en (m_wr_en), .wr_addr (m_wr_addr), .wr_data (m_wr_data)
  );

  if (MODEL_MEM_ERRORS) begin : g_fault
    sram_fault_model #(.NPORT(NSLOT), .WIDTH(P * APP_W), .NLV(NLEVEL), .FLIP_THR(FLIP_THR)) u_fault (
      .clk, .rst_n, .vdd_sel, .rd_en (m_rd_en),
      .din (m_rd_data), .dout (rd_word), .flip_total (mem_flips)
    );
  end else begin : g_nofault
    assign rd_word   = m_rd_data;
    assign mem_flips = '0;
  end

  // ---------------- slots: shifters and CNBs ----------------
  for (genvar k = 0; k < NSLOT; k++) begin : g_slot
    barrel_shifter #(.P(P), .W(APP_W)) u_shift (
      .din (rd_word[k]), .shift (rot_off[k]), .dout (rot_word[k])
    );
  end

  for (genvar i = 0; i < P; i++) begin : g_cnb
    app_t lam_in  [NSLOT];
    app_t lam_out [NSLOT];
    for (genvar k = 0; k < NSLOT; k++) begin : g_s
      assign lam_in[k] = app_t'(rot_word[k][i*APP_W +: APP_W]);
      assign cnb_word[k][i*APP_W +: APP_W] = lam_out[k];
    end
    cnb #(.NS(NSLOT), .DCMAX(MAX_DC), .NLAYER(NB_ROW)) u_cnb (
      .clk, .rst_n, .clear (cnb_clear), .layer,
      .acc_en, .acc_first, .acc_base, .acc_slot_vld, .lam_in,
      .wr_base, .wr_slot_vld, .commit,
      .lam_out, .sign_change (sgc[i]), .parity (par[i])
    );
  end

endmodule
