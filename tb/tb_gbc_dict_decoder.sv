// tb_gbc_dict_decoder: decodes the worked example's plain dictionary codes
// and random codes, checking symbol, code length and the `ok` flag for
// every number of available bits around the code length.
module tb_gbc_dict_decoder;
  import gbc_tb_pkg::*;
  logic [15:0] win;
  logic [5:0]  avail;
  logic [7:0]  entries [2];
  logic        ok;
  logic [4:0]  len;
  logic [7:0]  sym;
  int checks = 0, failures = 0;

  gbc_dict_decoder dut (.win, .avail, .entries, .ok, .len, .sym);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_code(bitq_t code, logic [7:0] exp_sym, string what);
    win = '0;
    for (int i = 0; i < code.size(); i++) win[15-i] = code[i];
    for (int a = 0; a <= 20; a++) begin
      avail = 6'(a);
      #1;
      checks++;
      if (ok !== (a >= code.size())) begin
        failures++; $display("FAIL %s ok avail=%0d", what, a);
      end
    end
    checks += 2;
    if (len !== 5'(code.size())) begin failures++; $display("FAIL %s len %0d", what, len); end
    if (sym !== exp_sym) begin failures++; $display("FAIL %s sym %b exp %b", what, sym, exp_sym); end
  endtask

  initial begin
    entries = EX_DICT;
    for (int i = 0; i < 10; i++)
      check_code(str_bits(EX_DICT_CODES[i]), EX_SYMS[i], $sformatf("example %0d", i));
    for (int n = 0; n < 300; n++) begin
      bitq_t c;
      logic [7:0] s;
      int unsigned idx;
      c.delete();
      entries[0] = 8'($urandom); entries[1] = 8'($urandom);
      s = 8'($urandom);
      idx = $urandom % 2;
      if ($urandom % 2) begin
        c.push_back(1'b0); c.push_back(bit'(idx)); s = entries[idx];
      end else begin
        c.push_back(1'b1);
        for (int b = 7; b >= 0; b--) c.push_back(s[b]);
      end
      // random trailing bits must not matter
      repeat (6) c.push_back(bit'($urandom));
      begin
        int unsigned clen;
        clen = c[0] ? 9 : 2;
        win = '0;
        for (int i = 0; i < c.size(); i++) win[15-i] = c[i];
        avail = 6'(16);
        #1;
        checks += 2;
        if (len !== 5'(clen) || sym !== s) begin
          failures++; $display("FAIL random %0d: len %0d sym %b exp %b", n, len, sym, s);
        end
        if (!ok) begin failures++; $display("FAIL random %0d ok", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
