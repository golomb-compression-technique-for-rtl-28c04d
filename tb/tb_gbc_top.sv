// tb_gbc_top: end-to-end test of the codec at its default sizes.
//
// For each of several streams the testbench loads a dictionary, compresses
// the stream on the compression side, keeps the bytes in a queue that stands
// for the configuration memory, then flushes the decompression side and
// streams the bytes back in, and checks that the original symbols (or bits)
// come out.  Streams alternate between plain dictionary, bitmask and Golomb
// mode, use random input gaps and output back-pressure, and include long
// zero runs.  The bits that pad the last byte may decode to extra symbols;
// only the stream's own symbols are compared.
//
// Counted mechanisms, each of which must occur: dictionary hits,
// uncompressed words, bitmask hits, Golomb codes, Golomb prefixes taken in
// pieces, decoder output stalls, decompressor input-buffer-full stalls,
// compressor back-pressure, flush padding and mode switches.
module tb_gbc_top;
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
  logic        c_byte_valid, c_byte_ready = 0;
  logic [7:0]  c_byte_data;
  logic        d_flush = 0;
  logic        d_byte_valid = 0, d_byte_ready;
  logic [7:0]  d_byte_data = '0;
  logic        d_sym_valid, d_sym_ready = 0;
  logic [7:0]  d_sym_data;
  logic        d_bit_valid, d_bit_ready = 0, d_bit_data;

  int checks = 0, failures = 0;
  bit slow = 0;
  logic [7:0] dict [2];
  logic [7:0] memory [$];
  logic [7:0] got_syms [$];
  bitq_t      got_bits;

  typedef enum int {M_DICT_HIT, M_RAW, M_BITMASK, M_GOLOMB, M_PREFIX_PIECE, M_OUT_STALL,
                    M_IN_FULL, M_COMP_STALL, M_PAD, M_MODE_SWITCH, M_COUNT} mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"dictionary hit", "uncompressed word", "bitmask hit",
    "Golomb code", "Golomb prefix piece", "output stall", "input buffer full",
    "compressor back-pressure", "flush padding", "mode switch"};

  gbc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory, output collection and mechanism counting
  always @(posedge clk) if (rst_n) begin
    if (c_byte_valid && c_byte_ready) memory.push_back(c_byte_data);
    if (d_sym_valid && d_sym_ready) got_syms.push_back(d_sym_data);
    if (d_bit_valid && d_bit_ready) got_bits.push_back(d_bit_data);
    if ((d_sym_valid && !d_sym_ready) || (d_bit_valid && !d_bit_ready)) mech[M_OUT_STALL]++;
    if (d_byte_valid && !d_byte_ready) mech[M_IN_FULL]++;
    if ((c_sym_valid && !c_sym_ready) || (c_bit_valid && !c_bit_ready)) mech[M_COMP_STALL]++;
    if (dut.u_decomp.fire) begin
      if (dut.u_decomp.sel_len == 5'd9) mech[M_RAW]++;
      else if (dut.u_decomp.sel_len == 5'd7) mech[M_BITMASK]++;
      else mech[M_DICT_HIT]++;
    end
    if (dut.u_decomp.u_gdec.code_done)    mech[M_GOLOMB]++;
    if (dut.u_decomp.u_gdec.prefix_piece) mech[M_PREFIX_PIECE]++;
    if (c_flush && c_byte_valid && c_byte_ready && dut.u_comp.u_pack.cnt_q < 8) mech[M_PAD]++;
  end

  always @(negedge clk) begin
    c_byte_ready <= slow ? 1'($urandom % 2) : 1'b1;
    d_sym_ready  <= slow ? 1'($urandom % 3 != 0) : 1'b1;
    d_bit_ready  <= slow ? 1'($urandom % 3 != 0) : 1'b1;
  end

  task automatic set_mode(mode_e m);
    if (m != mode) mech[M_MODE_SWITCH]++;
    @(negedge clk);
    mode = m;
    d_flush = 1;
    @(negedge clk);
    d_flush = 0;
    memory.delete(); got_syms.delete(); got_bits.delete();
  endtask

  task automatic load_dict();
    dict[0] = 8'($urandom); dict[1] = 8'($urandom);
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); dict_we = 1; dict_addr = 1'(i); dict_wdata = dict[i];
    end
    @(negedge clk); dict_we = 0;
  endtask

  task automatic comp_flush();
    repeat (6) @(posedge clk);
    @(negedge clk); c_flush = 1;
    while (dut.u_comp.u_pack.cnt_q != 0) @(posedge clk);
    @(negedge clk); c_flush = 0;
  endtask

  task automatic decompress();
    while (memory.size() > 0) begin
      @(negedge clk);
      if (slow && $urandom % 4 == 0) begin d_byte_valid = 0; continue; end
      d_byte_valid = 1; d_byte_data = memory[0];
      @(posedge clk);
      while (!d_byte_ready) @(posedge clk);
      void'(memory.pop_front());
    end
    @(negedge clk); d_byte_valid = 0;
  endtask

  task automatic symbol_stream(mode_e m, int unsigned n);
    logic [7:0] e [$];
    int unsigned c = 0;
    set_mode(m);
    load_dict();
    for (int k = 0; k < n; k++) begin
      logic [7:0] s;
      case ($urandom % 3)
        0: s = 8'($urandom);
        1: s = dict[$urandom % 2];
        default: begin
          logic [7:0] flip = 8'(1 + $urandom % 3);
          int unsigned sh = 2 * ($urandom % 4);
          s = dict[$urandom % 2] ^ (flip << sh);
        end
      endcase
      e.push_back(s);
    end
    foreach (e[k]) begin
      @(negedge clk);
      c_sym_valid = 1; c_sym_data = e[k];
      @(posedge clk);
      while (!c_sym_ready) @(posedge clk);
    end
    @(negedge clk); c_sym_valid = 0;
    comp_flush();
    decompress();
    while (got_syms.size() < n && c < 5000) begin @(posedge clk); c++; end
    checks++;
    if (got_syms.size() < n) begin
      failures++; $display("FAIL mode %s: %0d of %0d symbols", m.name(), got_syms.size(), n);
    end else begin
      foreach (e[k]) if (got_syms[k] !== e[k]) begin
        failures++; $display("FAIL mode %s: symbol %0d is %h expected %h", m.name(), k, got_syms[k], e[k]);
        break;
      end
    end
  endtask

  task automatic golomb_stream(int unsigned nruns);
    bitq_t x;
    int unsigned c = 0;
    set_mode(MODE_GOLOMB);
    for (int r = 0; r < nruns; r++) begin
      int unsigned run = ($urandom % 6 == 0) ? $urandom % 500 : $urandom % 12;
      repeat (run) x.push_back(1'b0);
      x.push_back(1'b1);
    end
    foreach (x[k]) begin
      @(negedge clk);
      c_bit_valid = 1; c_bit_data = x[k];
      @(posedge clk);
      while (!c_bit_ready) @(posedge clk);
    end
    @(negedge clk); c_bit_valid = 0;
    comp_flush();
    decompress();
    while (got_bits.size() < x.size() && c < 50000) begin @(posedge clk); c++; end
    checks++;
    if (got_bits.size() < x.size()) begin
      failures++; $display("FAIL Golomb: %0d of %0d bits", got_bits.size(), x.size());
    end else begin
      foreach (x[k]) if (got_bits[k] != x[k]) begin
        failures++; $display("FAIL Golomb: bit %0d differs", k); break;
      end
    end
  endtask

  task automatic run();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      slow = 1'(t / 3 % 2);
      case (t % 3)
        0: symbol_stream(MODE_DICT, 200);
        1: symbol_stream(MODE_BITMASK, 200);
        default: golomb_stream(40);
      endcase
    end
    foreach (mech[i]) begin
      checks++;
      $display("mechanism %-26s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", mech_name[i]); end
    end
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
