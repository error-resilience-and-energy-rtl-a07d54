// ldpc_pkg: code and datapath constants shared by the slot-layered LDPC decoder.
//
// The decoder targets the IEEE 802.11ad rate-13/16 code: 672 bits, 126 parity checks,
// check degrees 14/15/16 and variable degrees 1/2/3. The standard defines this code with
// 42x42 circulants (3 block rows x 16 block columns). The decoder works on 21x21
// circulants instead (P = 21): sorting the rows and columns of every 42-block by even and
// odd index turns each 42-circulant with shift s into two 21-circulants, one per parity of
// the row index r, in block column 2j + ((r+s) mod 2) with shift floor((r+s)/2) mod 21.
// The result is 6 layers of 21 checks by 32 block columns of 21 bits, and the two layers
// that come from one 42-row touch disjoint block columns.
//
// Convention: in a circulant with shift s, check a of the layer connects to bit (a+s) mod P
// of the block column. Bit index b of block column c is codeword position c*P + b.
//
// The shift values in BASE42 are this design's choice: the zero/non-zero pattern gives the
// degree sets stated for the code (rows of weight 14, 15 and 16; columns of weight 3, 2
// and 1). Replace BASE42 with the standard's table to decode standard codewords; nothing
// else depends on the values.
//
// Word widths: decoder messages are 5-bit two's complement (the width used as the
// example in the error analysis); channel LLRs are 5 bits and APP values 7 bits, both this
// design's choice.
package ldpc_pkg;

  localparam int P        = 21;               // circulant size, CNBs per layer
  localparam int Z42      = 42;               // circulant size in the standard's table
  localparam int BROW42   = 3;
  localparam int BCOL42   = 16;
  localparam int NB_ROW   = 2 * BROW42;       // 6 layers
  localparam int NB_COL   = 2 * BCOL42;       // 32 block columns
  localparam int N        = P * NB_COL;       // 672 code bits
  localparam int M        = P * NB_ROW;       // 126 checks
  localparam int NSLOT    = 3;                // block columns processed per cycle
  localparam int MAX_DC   = 16;               // largest check degree
  localparam int MAX_CYC  = (MAX_DC + NSLOT - 1) / NSLOT;

  localparam int LLR_W    = 5;                // channel LLR width
  localparam int MSG_W    = 5;                // check-to-variable message width (b)
  localparam int APP_W    = 7;                // APP (sum message) width
  localparam int Q_W      = APP_W + 1;        // variable-to-check value, unsaturated
  localparam int MAG_W    = MSG_W - 1;
  localparam int MAG_MAX  = (1 << MAG_W) - 1; // 15
  localparam int APP_MAX  = (1 << (APP_W - 1)) - 1;

  localparam int L_MAX    = 15;               // maximum number of iterations
  localparam int NLEVEL   = 5;                // supply levels 0.70/0.75/0.80/0.90/1.00 V

  localparam int COL_W    = $clog2(NB_COL);
  localparam int SH_W     = $clog2(P);
  localparam int LAYER_W  = $clog2(NB_ROW);
  localparam int IDX_W    = $clog2(MAX_DC);
  localparam int CYC_W    = $clog2(MAX_CYC);
  localparam int ITER_W   = $clog2(L_MAX + 1);
  localparam int LVL_W    = $clog2(NLEVEL);

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [APP_W-1:0] app_t;
  typedef logic signed [Q_W-1:0]   q_t;
  typedef logic signed [MSG_W-1:0] msg_t;
  typedef logic [MAG_W-1:0]        mag_t;
  typedef logic [P*APP_W-1:0]      app_word_t;   // one block column, element e at [e*APP_W +: APP_W]

  // Supply levels of the APP RAM, lowest first.
  typedef enum logic [LVL_W-1:0] {
    VDD_0V70 = 3'd0,
    VDD_0V75 = 3'd1,
    VDD_0V80 = 3'd2,
    VDD_0V90 = 3'd3,
    VDD_1V00 = 3'd4
  } vdd_level_e;

  // Bit-flip probability of an APP RAM read per supply level, as rho * 2^64 (see
  // sram_fault_model). Read/write error rates per access: 1.0 V 1.0e-11, 0.9 V 8.0e-13,
  // 0.8 V 3.7e-11, 0.7 V 3.0e-3; 0.75 V 3.3e-7 (geometric mean of its neighbours).
  typedef logic [63:0] flip_thr_t [NLEVEL];
  localparam flip_thr_t FLIP_THR_DEFAULT = '{
    64'd55340232221128656,   // 0.70 V
    64'd6087425544324,       // 0.75 V
    64'd682529530,           // 0.80 V
    64'd14757395,            // 0.90 V
    64'd184467440            // 1.00 V
  };

  // One non-zero circulant of a layer.
  typedef struct packed {
    logic             valid;
    logic [COL_W-1:0] col;
    logic [SH_W-1:0]  shift;
  } entry_t;

  // Base matrix of the 42-circulant form, -1 marks an all-zero block.
  typedef int base42_t [BROW42][BCOL42];
  localparam base42_t BASE42 = '{
    '{29, 30,  0,  8, 33, 22, 17,  4, 27, 28, 20, 27, 24, 23, -1, -1},
    '{37, 31, 18, 23, 11, 21,  6, 20, 32,  9, 12, 29, 10,  0, 13, -1},
    '{25, 22,  4, 34, 31,  3, 14, 15,  4,  2, 14, 18, 13, 13, 22, 24}
  };

  // Check degree of a 21-layer.
  function automatic int layer_dc(input int layer);
    int n;
    n = 0;
    for (int j = 0; j < BCOL42; j++)
      if (BASE42[layer / 2][j] >= 0) n++;
    return n;
  endfunction

  // Number of slot cycles a layer needs.
  function automatic int layer_cycles(input int layer);
    return (layer_dc(layer) + NSLOT - 1) / NSLOT;
  endfunction

  // The e-th non-zero circulant of a 21-layer, in increasing block column order of the
  // 42-form. Entry e is handled in cycle e / NSLOT by slot e % NSLOT.
  function automatic entry_t layer_entry(input int layer, input int e);
    entry_t x;
    int     k, r, s;
    x = '0;
    k = 0;
    r = layer % 2;
    for (int j = 0; j < BCOL42; j++) begin
      s = BASE42[layer / 2][j];
      if (s >= 0) begin
        if (k == e) begin
          x.valid = 1'b1;
          x.col   = COL_W'(2 * j + ((r + s) % 2));
          x.shift = SH_W'(((r + s) / 2) % P);
        end
        k++;
      end
    end
    return x;
  endfunction

endpackage
