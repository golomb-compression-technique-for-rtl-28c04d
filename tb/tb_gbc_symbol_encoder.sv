// tb_gbc_symbol_encoder: codes the worked example's ten symbols in both
// formats and compares with the codes listed for the example, then codes
// random symbols (many of them near a dictionary entry) against a reference
// that counts how many 2-bit groups differ from each entry.
module tb_gbc_symbol_encoder;
  import gbc_tb_pkg::*;
  logic        use_bitmask;
  logic [7:0]  sym;
  logic [7:0]  entries [2];
  logic [15:0] code;
  logic [4:0]  len;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  gbc_symbol_encoder dut (.use_bitmask, .sym, .entries, .code, .len);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(bitq_t exp, string what);
    logic [15:0] e = '0;
    for (int i = 0; i < exp.size(); i++) e[15-i] = exp[i];
    checks++;
    if (len !== 5'(exp.size()) || code !== e) begin
      failures++;
      $display("FAIL %s: got %b/%0d expected %b/%0d", what, code, len, e, exp.size());
    end
  endtask

  function automatic bitq_t reference(logic [7:0] s, logic bm);
    bitq_t q;
    int exact = -1, midx = -1, mpos = 0;
    logic [1:0] mval = '0;
    for (int i = 1; i >= 0; i--) begin
      logic [7:0] d = s ^ entries[i];
      int groups = 0, g = 0;
      for (int p = 0; p < 4; p++)
        if (d[7-2*p -: 2] != 2'b00) begin groups++; g = p; end
      if (groups == 0) exact = i;
      if (groups == 1) begin midx = i; mpos = g; mval = d[7-2*g -: 2]; end
    end
    if (!bm) begin
      if (exact >= 0) begin q.push_back(1'b0); q.push_back(bit'(exact)); end
      else begin q.push_back(1'b1); for (int b = 7; b >= 0; b--) q.push_back(s[b]); end
    end else if (exact >= 0) begin
      q.push_back(1'b0); q.push_back(1'b1); q.push_back(bit'(exact));
    end else if (midx >= 0) begin
      q.push_back(1'b0); q.push_back(1'b0);
      q.push_back(bit'(mpos / 2)); q.push_back(bit'(mpos % 2));
      q.push_back(mval[1]); q.push_back(mval[0]); q.push_back(bit'(midx));
    end else begin
      q.push_back(1'b1); for (int b = 7; b >= 0; b--) q.push_back(s[b]);
    end
    return q;
  endfunction

  task automatic run();
    entries = EX_DICT;
    for (int i = 0; i < 10; i++) begin
      sym = EX_SYMS[i];
      use_bitmask = 1'b0; #1;
      expect_code(str_bits(EX_DICT_CODES[i]), $sformatf("dictionary example %0d", i));
      use_bitmask = 1'b1; #1;
      expect_code(str_bits(EX_MASK_CODES[i]), $sformatf("bitmask example %0d", i));
    end
    for (int n = 0; n < 2000; n++) begin
      bitq_t r;
      entries[0] = 8'($urandom); entries[1] = 8'($urandom);
      case ($urandom % 3)
        0: sym = 8'($urandom);
        1: sym = entries[$urandom % 2];
        default: begin
          logic [7:0] flip;
          int unsigned sh;
          flip = 8'($urandom % 4);
          sh   = 2 * ($urandom % 4);
          sym  = entries[$urandom % 2] ^ (flip << sh);
        end
      endcase
      use_bitmask = 1'($urandom);
      #1;
      r = reference(sym, use_bitmask);
      if (use_bitmask) begin
        if (r.size() == 3)      seen[0]++;
        else if (r.size() == 7) seen[1]++;
        else                    seen[2]++;
      end
      expect_code(r, $sformatf("random %0d", n));
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
      failures++; $display("FAIL a bitmask code format was never produced");
    end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
