// tb_gbc_compressor: loads the example dictionary and compresses the worked
// examples in all three modes - ten symbols with plain dictionary codes, the
// same symbols with bitmask codes, and the example bit string with Golomb
// codes - plus random Golomb runs, comparing the byte stream (zero-padded
// by flush) with the expected codes, under random output back-pressure.
module tb_gbc_compressor;
  import gbc_tb_pkg::*;
  import gbc_pkg::*;
  logic        clk = 0, rst_n = 0;
  mode_e       mode = MODE_DICT;
  logic        dict_we = 0;
  logic [0:0]  dict_addr = '0;
  logic [7:0]  dict_wdata = '0;
  logic        sym_valid = 0, sym_ready;
  logic [7:0]  sym_data = '0;
  logic        bit_valid = 0, bit_ready, bit_data = 0;
  logic        flush = 0;
  logic        byte_valid, byte_ready = 0;
  logic [7:0]  byte_data;
  int checks = 0, failures = 0;
  bitq_t got;

  gbc_compressor dut (.clk, .rst_n, .mode, .dict_we, .dict_addr, .dict_wdata,
                      .sym_valid, .sym_ready, .sym_data, .bit_valid, .bit_ready, .bit_data,
                      .flush, .byte_valid, .byte_ready, .byte_data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && byte_valid && byte_ready)
      for (int b = 7; b >= 0; b--) got.push_back(byte_data[b]);

  always @(negedge clk) byte_ready <= ($urandom % 4 != 0);

  task automatic finish_and_compare(bitq_t expq, string what);
    repeat (4) @(posedge clk);
    @(negedge clk); flush = 1;
    repeat (12) @(posedge clk);
    @(negedge clk); flush = 0;
    while (expq.size() % 8 != 0) expq.push_back(1'b0);
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

  task automatic send_syms();
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      sym_valid = 1; sym_data = EX_SYMS[i];
      @(posedge clk);
      while (!sym_ready) @(posedge clk);
    end
    @(negedge clk); sym_valid = 0;
  endtask

  task automatic send_bits(bitq_t q);
    foreach (q[i]) begin
      @(negedge clk);
      bit_valid = 1; bit_data = q[i];
      @(posedge clk);
      while (!bit_ready) @(posedge clk);
    end
    @(negedge clk); bit_valid = 0;
  endtask

  task automatic run();
    bitq_t expq;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); dict_we = 1; dict_addr = 1'(i); dict_wdata = EX_DICT[i];
    end
    @(negedge clk); dict_we = 0;

    mode = MODE_DICT;
    send_syms();
    for (int i = 0; i < 10; i++) begin bitq_t c = str_bits(EX_DICT_CODES[i]); foreach (c[k]) expq.push_back(c[k]); end
    checks++;
    if (expq.size() != 62) begin failures++; $display("FAIL example size %0d", expq.size()); end
    finish_and_compare(expq, "dictionary example");

    mode = MODE_BITMASK;
    expq.delete();
    send_syms();
    for (int i = 0; i < 10; i++) begin bitq_t c = str_bits(EX_MASK_CODES[i]); foreach (c[k]) expq.push_back(c[k]); end
    finish_and_compare(expq, "bitmask example");

    mode = MODE_GOLOMB;
    send_bits(str_bits(EX_RUN_DATA));
    finish_and_compare(str_bits(EX_RUN_CODES), "Golomb example");

    for (int t = 0; t < 10; t++) begin
      bitq_t data;
      expq.delete();
      for (int r = 0; r < 12; r++) begin
        int unsigned run = ($urandom % 5 == 0) ? $urandom % 100 : $urandom % 10;
        bitq_t cw = golomb4(run);
        repeat (run) data.push_back(1'b0);
        data.push_back(1'b1);
        foreach (cw[k]) expq.push_back(cw[k]);
      end
      send_bits(data);
      finish_and_compare(expq, $sformatf("Golomb random %0d", t));
    end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
