// tb_ldpc_io_if: codeword input and output interface. Loads 32 beats of random LLRs with
// gaps in in_valid and checks the RAM writes (address = beat, 7-bit sign extension of
// every LLR), in_ready and the load_done pulse. Then starts a readout against a one-cycle
// latency memory model and checks the read addresses, out_valid/out_col/out_last timing
// and that every output bit is the sign of the returned APP value.
module tb_ldpc_io_if;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid, in_ready, out_valid, out_last;
  llr_t             in_llr [P];
  logic [COL_W-1:0] out_col, load_addr, out_rd_col;
  logic [P-1:0]     out_bits;
  logic             load_en, load_we, load_done, out_start, out_rd_en, out_done;
  app_word_t        load_word, out_word;

  ldpc_io_if dut (.*);

  int checks = 0, failures = 0;
  app_word_t mem [NB_COL];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model: registered read
  always_ff @(posedge clk) if (out_rd_en) out_word <= mem[out_rd_col];

  initial begin
    int beat, nd, nout, first_t, t;
    in_valid = 0; load_en = 0; out_start = 0;
    for (int b = 0; b < P; b++) in_llr[b] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!in_ready, "not ready while load_en low");
    load_en = 1;
    beat = 0; nd = 0;
    while (beat < NB_COL) begin
      @(negedge clk);
      in_valid = ($urandom() % 3) != 0;
      for (int b = 0; b < P; b++) in_llr[b] = llr_t'($urandom());
      #1;
      check(in_ready, "ready while load_en high");
      check(load_we == in_valid, "write strobe follows in_valid");
      if (in_valid) begin
        check(int'(load_addr) == beat, $sformatf("load address %0d exp %0d", load_addr, beat));
        for (int b = 0; b < P; b++)
          check(int'(app_t'(load_word[b*APP_W +: APP_W])) == int'(in_llr[b]), "sign extension");
        check(load_done == (beat == NB_COL - 1), "load_done on the last beat only");
        beat++;
      end else check(!load_done, "no load_done without a beat");
    end
    @(negedge clk);
    in_valid = 0; load_en = 0;
    // readout
    for (int c = 0; c < NB_COL; c++)
      for (int b = 0; b < P; b++) mem[c][b*APP_W +: APP_W] = APP_W'($urandom());
    @(negedge clk) out_start = 1;
    @(negedge clk) out_start = 0;
    nout = 0; first_t = -1; t = 0;
    while (nout < NB_COL && t < 100) begin
      @(posedge clk);
      #1;
      t++;
      if (out_valid) begin
        if (first_t < 0) first_t = t;
        check(int'(out_col) == nout, $sformatf("out_col %0d exp %0d", out_col, nout));
        check(out_last == (nout == NB_COL - 1), "out_last on the last beat");
        check(out_done == out_last, "out_done with out_last");
        for (int b = 0; b < P; b++)
          check(out_bits[b] == mem[nout][b*APP_W + APP_W - 1], "hard decision");
        nout++;
      end
    end
    check(nout == NB_COL, "all beats out");
    // start is sampled on the edge before the loop; the data returns two edges later
    check(first_t == 1, $sformatf("first output %0d cycles after start", first_t));
    @(posedge clk) #1 check(!out_valid, "output stops");
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
