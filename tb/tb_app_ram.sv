// tb_app_ram: random traffic on the three ports against a reference array. Checks the
// one-cycle read latency, that read data holds while rd_en is low, that three writes to
// different words in one cycle all land, and that a read of a word written in the same
// cycle returns the old contents.
module tb_app_ram;
  import ldpc_pkg::*;

  localparam int D = NB_COL, W = P * APP_W, NP = NSLOT;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0]        rd_en, wr_en;
  logic [$clog2(D)-1:0] rd_addr [NP];
  logic [$clog2(D)-1:0] wr_addr [NP];
  logic [W-1:0]         rd_data [NP];
  logic [W-1:0]         wr_data [NP];

  app_ram #(.DEPTH(D), .WIDTH(W), .NPORT(NP)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [D];

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  initial begin
    logic [W-1:0] expd [NP];
    logic [NP-1:0] expv;
    int base;
    rd_en = '0; wr_en = '0;
    for (int p = 0; p < NP; p++) begin rd_addr[p] = '0; wr_addr[p] = '0; wr_data[p] = '0; end
    // fill every word, three per cycle
    for (int a = 0; a < D; a += NP) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        wr_en[p] = (a + p < D);
        wr_addr[p] = 5'(a + p);
        wr_data[p] = rnd();
        if (a + p < D) ref_mem[a + p] = wr_data[p];
      end
    end
    @(negedge clk) wr_en = '0;
    expv = '0;
    // random mix: ports read or write distinct words
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // compare data of the previous cycle's reads
      for (int p = 0; p < NP; p++) if (expv[p]) begin
        checks++;
        if (rd_data[p] !== expd[p]) begin failures++; $display("FAIL: t %0d port %0d", t, p); end
      end
      for (int p = 0; p < NP; p++) begin
        int a;
        if (p == 0) base = int'($urandom() % D);
        a = (base + 11 * p) % D;
        rd_en[p] = 1'b0; wr_en[p] = 1'b0;
        if ($urandom() % 2 != 0) begin
          rd_en[p] = 1'b1; rd_addr[p] = 5'(a);
        end else begin
          wr_en[p] = 1'b1; wr_addr[p] = 5'(a); wr_data[p] = rnd();
        end
      end
      // a read of a word another port writes in the same cycle: old contents
      if (t % 7 == 0 && wr_en[1]) begin rd_en[0] = 1'b1; wr_en[0] = 1'b0; rd_addr[0] = wr_addr[1]; end
      for (int p = 0; p < NP; p++) begin
        expv[p] = rd_en[p] | expv[p];           // held data stays comparable
        if (rd_en[p]) expd[p] = ref_mem[rd_addr[p]];
      end
      for (int p = 0; p < NP; p++) if (wr_en[p]) ref_mem[wr_addr[p]] = wr_data[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
