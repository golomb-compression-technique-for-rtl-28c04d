// tb_gbc_bit_buffer: pushes random bytes at random times and consumes
// random numbers of bits, comparing window and bit count every cycle with a
// queue model of the buffer.  Checks that ready drops when more than
// BUF_W-8 bits are held, that a byte shows one cycle after it is taken, and
// that flush empties the buffer.
module tb_gbc_bit_buffer;
  import gbc_tb_pkg::*;
  logic        clk = 0, rst_n = 0, flush = 0;
  logic        in_valid = 0, in_ready;
  logic [7:0]  in_byte = '0;
  logic [15:0] win;
  logic [5:0]  avail;
  logic [4:0]  consume = '0;
  int checks = 0, failures = 0, full_cycles = 0;
  bitq_t model;

  gbc_bit_buffer dut (.clk, .rst_n, .flush, .in_valid, .in_ready, .in_byte,
                      .win, .avail, .consume);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    logic [15:0] w = '0;
    for (int i = 0; i < 16 && i < model.size(); i++) w[15-i] = model[i];
    checks++;
    if (avail !== 6'(model.size())) begin
      failures++; $display("FAIL %s: avail %0d expected %0d", what, avail, model.size());
    end else if ((win & ~(16'hffff >> (model.size() > 16 ? 16 : model.size()))) !== w) begin
      failures++; $display("FAIL %s: window %b expected %b", what, win, w);
    end
  endtask

  task automatic run();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      compare($sformatf("cycle %0d", n));
      checks++;
      if (in_ready !== (model.size() <= 24 && !flush)) begin
        failures++; $display("FAIL ready at %0d bits", model.size());
      end
      if (!in_ready) full_cycles++;
      in_valid = (n % 1000 < 500) ? ($urandom % 4 != 0) : ($urandom % 3 == 0);
      in_byte  = 8'($urandom);
      consume  = 5'($urandom % 17);
      if (consume > model.size()) consume = 5'(model.size());
      flush    = (n % 1777 == 1000);
      @(posedge clk);
      if (flush) model.delete();
      else begin
        repeat (consume) void'(model.pop_front());
        if (in_valid && in_ready)
          for (int b = 7; b >= 0; b--) model.push_back(in_byte[b]);
      end
    end
    checks++;
    if (full_cycles == 0) begin failures++; $display("FAIL buffer never filled"); end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
