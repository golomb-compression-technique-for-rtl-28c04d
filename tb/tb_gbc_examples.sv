// tb_gbc_examples: the three worked examples run through gbc_top, from
// symbols (or bits) to bytes and back, measuring the compressed size.
//
// Data: ten 8-bit symbols against the dictionary {00000000, 01000010}, coded
// once with plain dictionary codes and once with bitmask codes, and the bit
// string 01 0000001 0001 000001 001 1 coded with Golomb m = 4.  Expected
// compressed sizes, worked out by hand from the code formats:
//   dictionary  4 hits x 2 bits + 6 raw x 9 bits       = 62 bits
//   bitmask     4 hits x 3 bits + 6 masked x 7 bits     = 54 bits
//   Golomb      3+4+3+4+3+3                             = 20 bits
// With the 16-bit dictionary, the compression ratio (compressed size plus
// dictionary over original size) is (62+16)/80 = 97.5 % and
// (54+16)/80 = 87.5 %; checked in tenths of a percent.
module tb_gbc_examples;
  import gbc_tb_pkg::*;
  import gbc_pkg::*;
  logic        clk = 0, rst_n = 0;
  mode_e       mode = MODE_DICT;
  logic        dict_we = 0;
  logic [0:0]  dict_addr = '0;
  logic [7:0]  dict_wdata = '0;
  logic        c_sym_valid = 0, c_sym_ready;
  logic [7:0]  c_sym_data = '0;
  logic        c_bit_valid = 0, c_bit_ready, c_bit_data = 0;
  logic        c_flush = 0;
  logic        c_byte_valid, c_byte_ready = 1;
  logic [7:0]  c_byte_data;
  logic        d_flush = 0;
  logic        d_byte_valid = 0, d_byte_ready;
  logic [7:0]  d_byte_data = '0;
  logic        d_sym_valid, d_sym_ready = 1;
  logic [7:0]  d_sym_data;
  logic        d_bit_valid, d_bit_ready = 1, d_bit_data;

  int checks = 0, failures = 0;
  int unsigned code_bits = 0;
  logic [7:0] memory [$];
  logic [7:0] got_syms [$];
  bitq_t      got_bits;

  gbc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (c_byte_valid && c_byte_ready) memory.push_back(c_byte_data);
    if (d_sym_valid && d_sym_ready) got_syms.push_back(d_sym_data);
    if (d_bit_valid && d_bit_ready) got_bits.push_back(d_bit_data);
    if (dut.u_comp.pk_valid && dut.u_comp.pk_ready) code_bits += dut.u_comp.pk_len;
  end

  task automatic expect_eq(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
    else $display("%s: %0d", what, got);
  endtask

  task automatic start(mode_e m);
    @(negedge clk);
    mode = m; d_flush = 1;
    @(negedge clk);
    d_flush = 0;
    memory.delete(); got_syms.delete(); got_bits.delete();
    code_bits = 0;
  endtask

  task automatic finish_compress();
    repeat (4) @(posedge clk);
    @(negedge clk); c_flush = 1;
    repeat (6) @(posedge clk);
    @(negedge clk); c_flush = 0;
  endtask

  task automatic decompress();
    foreach (memory[i]) begin
      @(negedge clk);
      d_byte_valid = 1; d_byte_data = memory[i];
      @(posedge clk);
      while (!d_byte_ready) @(posedge clk);
    end
    @(negedge clk); d_byte_valid = 0;
    repeat (40) @(posedge clk);
  endtask

  task automatic symbol_example(mode_e m, int unsigned exp_bits, int unsigned exp_cr, string what);
    start(m);
    foreach (EX_SYMS[i]) begin
      @(negedge clk);
      c_sym_valid = 1; c_sym_data = EX_SYMS[i];
      @(posedge clk);
      while (!c_sym_ready) @(posedge clk);
    end
    @(negedge clk); c_sym_valid = 0;
    finish_compress();
    expect_eq(code_bits, exp_bits, {what, " compressed bits"});
    expect_eq(memory.size(), (exp_bits + 7) / 8, {what, " bytes in memory"});
    expect_eq((code_bits + 16) * 1000 / 80, exp_cr, {what, " compression ratio x1000"});
    decompress();
    checks++;
    if (got_syms.size() < 10) begin failures++; $display("FAIL %s: %0d symbols back", what, got_syms.size()); end
    else foreach (EX_SYMS[i]) if (got_syms[i] !== EX_SYMS[i]) begin
      failures++; $display("FAIL %s: symbol %0d is %b", what, i, got_syms[i]); break;
    end
  endtask

  task automatic run();
    bitq_t x = str_bits(EX_RUN_DATA);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); dict_we = 1; dict_addr = 1'(i); dict_wdata = EX_DICT[i];
    end
    @(negedge clk); dict_we = 0;

    symbol_example(MODE_DICT, 62, 975, "dictionary example");
    symbol_example(MODE_BITMASK, 54, 875, "bitmask example");

    start(MODE_GOLOMB);
    foreach (x[i]) begin
      @(negedge clk);
      c_bit_valid = 1; c_bit_data = x[i];
      @(posedge clk);
      while (!c_bit_ready) @(posedge clk);
    end
    @(negedge clk); c_bit_valid = 0;
    finish_compress();
    expect_eq(code_bits, 20, "Golomb example compressed bits");
    decompress();
    checks++;
    if (got_bits.size() < x.size()) begin failures++; $display("FAIL Golomb example: %0d bits back", got_bits.size()); end
    else foreach (x[i]) if (got_bits[i] != x[i]) begin
      failures++; $display("FAIL Golomb example: bit %0d", i); break;
    end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
