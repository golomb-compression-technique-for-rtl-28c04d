// tb_gbc_dictionary: checks reset to zero, writes to each entry, that a
// write leaves other entries alone, and that idle cycles hold the contents.
module tb_gbc_dictionary;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [0:0] waddr = '0;
  logic [7:0] wdata = '0;
  logic [7:0] entries [2];
  logic [7:0] model [2];
  int checks = 0, failures = 0;

  gbc_dictionary dut (.clk, .rst_n, .we, .waddr, .wdata, .entries);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (entries[i] !== model[i]) begin
        failures++;
        $display("FAIL %s entry %0d: got %b expected %b", what, i, entries[i], model[i]);
      end
    end
  endtask

  initial begin
    model = '{8'h00, 8'h00};
    repeat (2) @(posedge clk);
    #1 compare("reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we    = ($urandom % 3) != 0;
      waddr = 1'($urandom);
      wdata = 8'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1 compare("after cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
