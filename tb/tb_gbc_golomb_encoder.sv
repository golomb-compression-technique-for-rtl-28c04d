// tb_gbc_golomb_encoder: codes the worked example's bit string and random
// runs (some long enough to need several prefix pieces) with random
// back-pressure, and compares the concatenated codeword bits with codes
// built from the definition: run/4 ones, a zero, run%4 in two bits.
// Also checks that a codeword is offered in the cycle after its closing one.
module tb_gbc_golomb_encoder;
  import gbc_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        bit_valid = 0, bit_ready, bit_data = 0;
  logic        code_valid, code_ready = 0;
  logic [15:0] code;
  logic [4:0]  len;
  int checks = 0, failures = 0, pieces = 0, long_pieces = 0;
  bitq_t got, expq;

  gbc_golomb_encoder dut (.clk, .rst_n, .bit_valid, .bit_ready, .bit_data,
                          .code_valid, .code_ready, .code, .len);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect code pieces
  always @(posedge clk) begin
    if (rst_n && code_valid && code_ready) begin
      pieces++;
      if (len == 5'd13) long_pieces++;
      for (int i = 0; i < len; i++) got.push_back(code[15-i]);
    end
  end

  task automatic send_bits(bitq_t q, bit stall_out);
    foreach (q[i]) begin
      @(negedge clk);
      bit_valid = 1'b1;
      bit_data  = q[i];
      code_ready = stall_out ? 1'($urandom % 2) : 1'b1;
      @(posedge clk);
      while (!bit_ready) begin
        @(negedge clk);
        code_ready = stall_out ? 1'($urandom % 2) : 1'b1;
        @(posedge clk);
      end
      if (q[i]) begin
        // the codeword must be offered in the next cycle
        #1;
        checks++;
        if (!code_valid) begin failures++; $display("FAIL code not valid after a one"); end
      end
    end
    @(negedge clk);
    bit_valid = 1'b0;
    code_ready = 1'b1;
    repeat (30) @(posedge clk);
  endtask

  task automatic compare(string what);
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
    bitq_t data;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    send_bits(str_bits(EX_RUN_DATA), 1'b0);
    expq = str_bits(EX_RUN_CODES);
    compare("example");
    checks++;
    if (pieces != 6) begin failures++; $display("FAIL example gave %0d codewords", pieces); end
    for (int t = 0; t < 20; t++) begin
      data.delete(); expq.delete();
      for (int r = 0; r < 10; r++) begin
        int unsigned run;
        bitq_t cw;
        run = ($urandom % 5 == 0) ? $urandom % 150 : $urandom % 12;
        repeat (run) data.push_back(1'b0);
        data.push_back(1'b1);
        cw = golomb4(run);
        foreach (cw[k]) expq.push_back(cw[k]);
      end
      send_bits(data, 1'b1);
      compare($sformatf("random %0d", t));
    end
    checks++;
    if (long_pieces == 0) begin failures++; $display("FAIL no prefix was split"); end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
