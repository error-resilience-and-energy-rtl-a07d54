// sram_fault_model: BEHAVIOURAL MODEL, not synthesizable. Bit errors of the APP SRAM at
// a scaled supply voltage.
//
// Each bit returned by a read is inverted, independently of every other bit, with the
// probability rho(vdd_sel): the memory is modelled as a binary symmetric channel on its
// read port (bit-flip model; 0->1 and 1->0 equally likely). rho is the sum of the
// soft-error rate and the read/write error rate of the level. Soft errors accumulate
// per second, so for a value that stays in the RAM for one decoding iteration (well below
// a microsecond) their share is negligible and the defaults are the read/write error
// rates per access:
//   1.00 V 1.0e-11   0.90 V 8.0e-13   0.80 V 3.7e-11   0.70 V 3.0e-3
//   0.75 V 3.3e-7 (no data given for this level; geometric mean of 0.7 V and 0.8 V)
// FLIP_THR holds rho * 2^64 per level (index as ldpc_pkg::vdd_level_e). A fresh 64-bit
// random number is drawn per bit.
//
// Timing: sits on the registered read data of the RAM. The flip pattern of a read is drawn
// on the clock edge that captures the read (rd_en high), so dout = din ^ pattern holds
// until the port's next read. flip_total counts the flipped bits since reset.
module sram_fault_model
  import ldpc_pkg::*;
#(
  parameter int          NPORT = ldpc_pkg::NSLOT,
  parameter int          WIDTH = ldpc_pkg::P * ldpc_pkg::APP_W,
  parameter int          NLV   = ldpc_pkg::NLEVEL,
  parameter logic [63:0] FLIP_THR [NLV] = ldpc_pkg::FLIP_THR_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(NLV)-1:0] vdd_sel,
  input  logic [NPORT-1:0]       rd_en,
  input  logic [WIDTH-1:0]       din  [NPORT],
  output logic [WIDTH-1:0]       dout [NPORT],
  output logic [31:0]            flip_total
);

  logic [WIDTH-1:0] pattern [NPORT];

  // One 64-bit uniform random number.
  function automatic logic [63:0] rand64();
    logic [31:0] hi, lo;
    hi = $urandom();
    lo = $urandom();
    return {hi, lo};
  endfunction

  // Flip pattern of one read: each bit set with probability thr / 2^64.
  function automatic logic [WIDTH-1:0] draw(input logic [63:0] thr);
    logic [WIDTH-1:0] pat;
    pat = '0;
    if (thr != 64'd0)
      for (int b = 0; b < WIDTH; b++)
        pat[b] = (rand64() < thr);
    return pat;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) pattern[p] <= '0;
      flip_total <= '0;
    end else begin
      logic [WIDTH-1:0] pat [NPORT];
      int               nflip;
      nflip = 0;
      for (int p = 0; p < NPORT; p++) begin
        pat[p] = rd_en[p] ? draw(FLIP_THR[vdd_sel]) : pattern[p];
        if (rd_en[p]) nflip += $countones(pat[p]);
      end
      pattern    <= pat;
      flip_total <= flip_total + 32'(nflip);
    end
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    assign dout[p] = din[p] ^ pattern[p];
  end

endmodule
