// tb_gbc_golomb_decoder: feeds Golomb codewords to the decoder through a
// model of the input buffer that fills at a random rate, so codewords and
// long prefixes arrive in pieces, and reads the decoded bits with random
// back-pressure.  Checks the worked example's codes decode to its bit
// string, random runs (up to several hundred zeros) decode to themselves,
// that long prefixes were taken in pieces, and that each bit of a run takes
// one cycle once the codeword is complete.
module tb_gbc_golomb_decoder;
  import gbc_tb_pkg::*;
  logic        clk = 0, rst_n = 0, flush = 0, en = 1;
  logic [15:0] win = '0;
  logic [5:0]  avail = '0;
  logic [4:0]  consume;
  logic        bit_valid, bit_ready = 0, bit_data;
  int checks = 0, failures = 0, prefix_pieces = 0;
  bitq_t src, inbuf, got;

  gbc_golomb_decoder dut (.clk, .rst_n, .flush, .en, .win, .avail, .consume,
                          .bit_valid, .bit_ready, .bit_data);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run the decoder until `nbits` output bits have been collected.
  task automatic decode(int unsigned nbits, bit slow_in, bit slow_out);
    int unsigned cycles = 0;
    while (got.size() < nbits && cycles < 100000) begin
      @(negedge clk);
      cycles++;
      if (inbuf.size() <= 24 && src.size() > 0 && (!slow_in || $urandom % 4 == 0))
        for (int k = 0; k < 8 && src.size() > 0; k++) inbuf.push_back(src.pop_front());
      win = '0;
      for (int i = 0; i < 16 && i < inbuf.size(); i++) win[15-i] = inbuf[i];
      avail = 6'(inbuf.size());
      bit_ready = slow_out ? 1'($urandom % 2) : 1'b1;
      #2;
      if (consume > avail) begin failures++; $display("FAIL consumed more than held"); end
      if (consume != 0 && inbuf[consume-1] == 1'b1) prefix_pieces++;
      repeat (consume) void'(inbuf.pop_front());
      if (bit_valid && bit_ready) got.push_back(bit_data);
    end
  endtask

  task automatic compare(bitq_t expq, string what);
    checks++;
    if (got.size() != expq.size()) begin
      failures++; $display("FAIL %s: %0d bits, expected %0d", what, got.size(), expq.size());
    end else begin
      foreach (expq[i]) if (got[i] != expq[i]) begin
        failures++; $display("FAIL %s: bit %0d differs", what, i); break;
      end
    end
    got.delete();
  endtask

  task automatic run();
    bitq_t expq;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    src = str_bits(EX_RUN_CODES);
    expq = str_bits(EX_RUN_DATA);
    decode(expq.size(), 1'b0, 1'b0);
    compare(expq, "example");

    // Rate: a run of 40 zeros coded in one window leaves at one bit per cycle.
    begin
      int unsigned t0, t1;
      bitq_t cw = golomb4(40);
      foreach (cw[k]) inbuf.push_back(cw[k]);
      @(negedge clk);
      win = '0;
      for (int i = 0; i < 16 && i < inbuf.size(); i++) win[15-i] = inbuf[i];
      avail = 6'(inbuf.size());
      bit_ready = 1'b1;
      @(posedge clk); #1;
      inbuf.delete(); avail = '0;
      t0 = 0;
      while (bit_valid) begin
        t0++;
        @(posedge clk); #1;
      end
      checks++;
      if (t0 != 41) begin failures++; $display("FAIL 41 output bits took %0d cycles", t0); end
    end

    for (int t = 0; t < 30; t++) begin
      expq.delete(); src.delete(); inbuf.delete();
      for (int r = 0; r < 8; r++) begin
        int unsigned run;
        bitq_t cw;
        run = ($urandom % 6 == 0) ? $urandom % 400 : $urandom % 14;
        repeat (run) expq.push_back(1'b0);
        expq.push_back(1'b1);
        cw = golomb4(run);
        foreach (cw[k]) src.push_back(cw[k]);
      end
      decode(expq.size(), 1'($urandom), 1'($urandom));
      compare(expq, $sformatf("random %0d", t));
    end
    checks++;
    if (prefix_pieces == 0) begin failures++; $display("FAIL no prefix was taken in pieces"); end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
