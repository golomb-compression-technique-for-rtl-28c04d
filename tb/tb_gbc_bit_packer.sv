// tb_gbc_bit_packer: offers random codewords of 1..16 bits (with junk in
// the bits beyond their length) and reads bytes with random back-pressure,
// comparing the byte stream with the concatenated codeword bits; ends with
// a flush and checks the zero-padded last byte.
module tb_gbc_bit_packer;
  import gbc_tb_pkg::*;
  logic        clk = 0, rst_n = 0, flush = 0;
  logic        code_valid = 0, code_ready;
  logic [15:0] code = '0;
  logic [4:0]  len = '0;
  logic        byte_valid, byte_ready = 0;
  logic [7:0]  byte_data;
  int checks = 0, failures = 0, stalls = 0;
  bitq_t sent, got;

  gbc_bit_packer dut (.clk, .rst_n, .flush, .code_valid, .code_ready, .code, .len,
                      .byte_valid, .byte_ready, .byte_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && byte_valid && byte_ready)
      for (int b = 7; b >= 0; b--) got.push_back(byte_data[b]);

  task automatic run(int unsigned ncodes);
    int unsigned done = 0;
    while (done < ncodes) begin
      @(negedge clk);
      if (!code_valid || code_ready) begin
        code_valid = ($urandom % 4 != 0);
        len  = 5'(1 + $urandom % 16);
        code = 16'($urandom);
      end
      byte_ready = ($urandom % 3 != 0);
      #1;
      if (code_valid && !code_ready) stalls++;
      @(posedge clk);
      if (code_valid && code_ready) begin
        for (int i = 0; i < len; i++) sent.push_back(code[15-i]);
        done++;
      end
    end
    @(negedge clk);
    code_valid = 0;
    flush = 1;
    byte_ready = 1;
    repeat (10) @(posedge clk);
    @(negedge clk);
    flush = 0;
    while (sent.size() % 8 != 0) sent.push_back(1'b0);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL %0d bits out, expected %0d", got.size(), sent.size());
    end else begin
      foreach (sent[i]) if (sent[i] != got[i]) begin
        failures++; $display("FAIL bit %0d differs", i); break;
      end
    end
    sent.delete(); got.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) run(50 + $urandom % 100);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
