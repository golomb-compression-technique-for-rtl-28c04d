// tb_gbc_decompressor: loads the example dictionary and decompresses byte
// streams in all three modes: the worked examples (plain dictionary codes,
// bitmask codes, Golomb codes) and random code streams built field by field
// in the testbench, with random input gaps and output back-pressure.  Also
// checks the decode rate: a stream of 2-bit dictionary codes fed one byte
// per cycle gives one symbol per cycle.
module tb_gbc_decompressor;
  import gbc_tb_pkg::*;
  import gbc_pkg::*;
  logic        clk = 0, rst_n = 0;
  mode_e       mode = MODE_DICT;
  logic        dict_we = 0;
  logic [0:0]  dict_addr = '0;
  logic [7:0]  dict_wdata = '0;
  logic        flush = 0;
  logic        byte_valid = 0, byte_ready;
  logic [7:0]  byte_data = '0;
  logic        sym_valid, sym_ready = 0;
  logic [7:0]  sym_data;
  logic        bit_valid, bit_ready = 0, bit_data;
  int checks = 0, failures = 0;
  logic [7:0]  dict [2];
  bit          slow_in = 0, slow_out = 0;
  logic [7:0]  got_syms [$];
  bitq_t       got_bits;

  gbc_decompressor dut (.clk, .rst_n, .mode, .dict_we, .dict_addr, .dict_wdata, .flush,
                        .byte_valid, .byte_ready, .byte_data,
                        .sym_valid, .sym_ready, .sym_data, .bit_valid, .bit_ready, .bit_data);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && sym_valid && sym_ready) got_syms.push_back(sym_data);
    if (rst_n && bit_valid && bit_ready) got_bits.push_back(bit_data);
  end

  always @(negedge clk) begin
    sym_ready <= slow_out ? 1'($urandom % 2) : 1'b1;
    bit_ready <= slow_out ? 1'($urandom % 2) : 1'b1;
  end

  task automatic load_dict(logic [7:0] e0, logic [7:0] e1);
    dict[0] = e0; dict[1] = e1;
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); dict_we = 1; dict_addr = 1'(i); dict_wdata = dict[i];
    end
    @(negedge clk); dict_we = 0;
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    got_syms.delete(); got_bits.delete();
  endtask

  task automatic send(bitq_t q);
    while (q.size() % 8 != 0) q.push_back(1'b0);
    while (q.size() > 0) begin
      @(negedge clk);
      if (slow_in && $urandom % 3 == 0) begin byte_valid = 0; continue; end
      byte_valid = 1;
      for (int b = 7; b >= 0; b--) byte_data[b] = q[7-b];
      @(posedge clk);
      while (!byte_ready) @(posedge clk);
      repeat (8) void'(q.pop_front());
    end
    @(negedge clk); byte_valid = 0;
  endtask

  task automatic wait_syms(int unsigned n);
    int unsigned c = 0;
    while (got_syms.size() < n && c < 2000) begin @(posedge clk); c++; end
  endtask

  task automatic wait_bits(int unsigned n);
    int unsigned c = 0;
    while (got_bits.size() < n && c < 20000) begin @(posedge clk); c++; end
  endtask

  task automatic compare_syms(logic [7:0] e [$], string what);
    checks++;
    if (got_syms.size() < e.size()) begin
      failures++; $display("FAIL %s: %0d symbols, expected %0d", what, got_syms.size(), e.size());
      return;
    end
    foreach (e[i]) if (got_syms[i] !== e[i]) begin
      failures++; $display("FAIL %s: symbol %0d is %b expected %b", what, i, got_syms[i], e[i]);
      return;
    end
  endtask

  // Random code stream of n symbols; returns the expected symbols.
  task automatic random_stream(bit bm, int unsigned n, output bitq_t q, output logic [7:0] e [$]);
    q.delete(); e.delete();
    for (int k = 0; k < n; k++) begin
      int unsigned kind = $urandom % 3, idx = $urandom % 2, pos = $urandom % 4, mask = $urandom % 4;
      logic [7:0] s = 8'($urandom);
      if (kind == 0) begin
        q.push_back(1'b1);
        for (int b = 7; b >= 0; b--) q.push_back(s[b]);
      end else if (!bm || kind == 1) begin
        s = dict[idx];
        q.push_back(1'b0);
        if (bm) q.push_back(1'b1);
        q.push_back(bit'(idx));
      end else begin
        s = dict[idx];
        if (mask[1]) s[7 - 2*pos]     = ~s[7 - 2*pos];
        if (mask[0]) s[6 - 2*pos]     = ~s[6 - 2*pos];
        q.push_back(1'b0); q.push_back(1'b0);
        q.push_back(bit'(pos / 2)); q.push_back(bit'(pos % 2));
        q.push_back(bit'(mask / 2)); q.push_back(bit'(mask % 2));
        q.push_back(bit'(idx));
      end
      e.push_back(s);
    end
  endtask

  task automatic run();
    bitq_t q;
    logic [7:0] e [$];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    load_dict(EX_DICT[0], EX_DICT[1]);

    // worked examples
    foreach (EX_SYMS[i]) e.push_back(EX_SYMS[i]);
    mode = MODE_DICT; do_flush();
    q.delete(); foreach (EX_DICT_CODES[i]) begin bitq_t c = str_bits(EX_DICT_CODES[i]); foreach (c[k]) q.push_back(c[k]); end
    send(q); wait_syms(10); compare_syms(e, "dictionary example");
    mode = MODE_BITMASK; do_flush();
    q.delete(); foreach (EX_MASK_CODES[i]) begin bitq_t c = str_bits(EX_MASK_CODES[i]); foreach (c[k]) q.push_back(c[k]); end
    send(q); wait_syms(10); compare_syms(e, "bitmask example");
    mode = MODE_GOLOMB; do_flush();
    send(str_bits(EX_RUN_CODES));
    begin
      bitq_t x = str_bits(EX_RUN_DATA);
      wait_bits(x.size());
      checks++;
      if (got_bits.size() < x.size()) begin failures++; $display("FAIL Golomb example: %0d bits", got_bits.size()); end
      else foreach (x[i]) if (got_bits[i] != x[i]) begin failures++; $display("FAIL Golomb example bit %0d", i); break; end
    end

    // rate: 64 dictionary hits, fed one byte per cycle, one symbol per cycle
    mode = MODE_DICT; do_flush();
    q.delete(); e.delete();
    for (int k = 0; k < 64; k++) begin q.push_back(1'b0); q.push_back(bit'(k % 2)); e.push_back(dict[k % 2]); end
    begin
      int unsigned t0 = 0;
      fork
        send(q);
        begin
          while (got_syms.size() == 0) @(posedge clk);
          while (got_syms.size() < 64 && t0 < 1000) begin @(posedge clk); t0++; end
        end
      join
      checks++;
      if (t0 != 63) begin failures++; $display("FAIL 64 symbols took %0d cycles after the first", t0 + 1); end
      compare_syms(e, "rate");
    end

    // random streams, both symbol modes, gaps and back-pressure
    for (int t = 0; t < 40; t++) begin
      bit bm = 1'(t % 2);
      load_dict(8'($urandom), 8'($urandom));
      mode = bm ? MODE_BITMASK : MODE_DICT;
      slow_in = 1'($urandom); slow_out = 1'($urandom);
      do_flush();
      random_stream(bm, 60, q, e);
      send(q); wait_syms(60);
      compare_syms(e, $sformatf("random %0d", t));
    end

    // random Golomb streams
    mode = MODE_GOLOMB;
    for (int t = 0; t < 10; t++) begin
      bitq_t x;
      slow_in = 1'($urandom); slow_out = 1'($urandom);
      do_flush();
      q.delete();
      for (int r = 0; r < 10; r++) begin
        int unsigned run = ($urandom % 5 == 0) ? $urandom % 300 : $urandom % 10;
        bitq_t cw = golomb4(run);
        repeat (run) x.push_back(1'b0);
        x.push_back(1'b1);
        foreach (cw[k]) q.push_back(cw[k]);
      end
      send(q); wait_bits(x.size());
      checks++;
      if (got_bits.size() < x.size()) begin failures++; $display("FAIL Golomb random %0d: %0d bits", t, got_bits.size()); end
      else foreach (x[i]) if (got_bits[i] != x[i]) begin failures++; $display("FAIL Golomb random %0d bit %0d", t, i); break; end
    end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
