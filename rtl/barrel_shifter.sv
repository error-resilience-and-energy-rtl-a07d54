// barrel_shifter: cyclic rotation of one block column of P values.
//
// out[a] = in[(a + shift) mod P]. The decoder has one such network per slot, sitting
// between the APP RAM read port and the check node blocks. Because the RAM keeps every
// block column in the rotation of the layer that last wrote it, the shift applied here is
// the offset between that stored rotation and the rotation the current layer needs; no
// inverse network is needed on the write path (a single network with offset shifts).
//
// Structure: log2(P) stages; stage k rotates by (2^k mod P) when bit k of the shift is
// set. The stages compose because rotations add modulo P. Purely combinational.
// shift must be below P.
module barrel_shifter #(
  parameter int P = ldpc_pkg::P,   // elements per block column
  parameter int W = ldpc_pkg::APP_W // bits per element
) (
  input  logic [P*W-1:0]         din,   // element e at [e*W +: W]
  input  logic [$clog2(P)-1:0]   shift, // 0 .. P-1
  output logic [P*W-1:0]         dout
);

  localparam int S = $clog2(P);

  logic [P*W-1:0] stage [S+1];

  assign stage[0] = din;

  for (genvar k = 0; k < S; k++) begin : g_stage
    localparam int AMT = (1 << k) % P;
    logic [P*W-1:0] rot;
    for (genvar a = 0; a < P; a++) begin : g_el
      assign rot[a*W +: W] = stage[k][((a + AMT) % P)*W +: W];
    end
    assign stage[k+1] = shift[k] ? rot : stage[k];
  end

  assign dout = stage[S];

endmodule
