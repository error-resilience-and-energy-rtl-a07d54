// app_ram: the APP memory of the decoder.
//
// Holds the a-posteriori sum of every code bit: one word per block column (32 words of
// 21 x 7 bits for the default code). In the chip this is the only SRAM and the only
// memory whose supply is scaled per iteration; here it is written as an array.
//
// Ports: NPORT independent ports, one per slot. Each has a synchronous read (data one
// cycle after rd_en, held otherwise) and a synchronous write. A port is used either to
// read or to write in a cycle. Two ports never write the same word in one cycle (the
// decoder's schedule touches each block column once per layer); an assertion checks it.
// A read of a word written in the same cycle returns the old contents.
// The number of ports equal to the slot count is this design's choice; the source only
// says the APP RAM is one SRAM block feeding three slots.
module app_ram #(
  parameter int DEPTH = ldpc_pkg::NB_COL,
  parameter int WIDTH = ldpc_pkg::P * ldpc_pkg::APP_W,
  parameter int NPORT = ldpc_pkg::NSLOT
) (
  input  logic                     clk,
  input  logic [NPORT-1:0]         rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr [NPORT],
  output logic [WIDTH-1:0]         rd_data [NPORT],
  input  logic [NPORT-1:0]         wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr [NPORT],
  input  logic [WIDTH-1:0]         wr_data [NPORT]
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      if (rd_en[p]) rd_data[p] <= mem[rd_addr[p]];
      if (wr_en[p]) mem[wr_addr[p]] <= wr_data[p];
    end
  end

  // No two ports write one word in the same cycle.
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      for (int q = p + 1; q < NPORT; q++)
        assert (!(wr_en[p] && wr_en[q] && wr_addr[p] == wr_addr[q]))
          else $error("app_ram: ports %0d and %0d write word %0d together", p, q, wr_addr[p]);
  end

endmodule
