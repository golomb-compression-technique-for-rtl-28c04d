// tb_gbc_bitmask_decoder: decodes the worked example's bitmask codes and
// random codes of all three formats, checking symbol, code length and the
// `ok` flag.  The expected symbol of a bitmask code is built bit by bit:
// mask bit b of position p flips symbol bit 7-(2p+b).
module tb_gbc_bitmask_decoder;
  import gbc_tb_pkg::*;
  logic [15:0] win;
  logic [5:0]  avail;
  logic [7:0]  entries [2];
  logic        ok;
  logic [4:0]  len;
  logic [7:0]  sym;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  gbc_bitmask_decoder dut (.win, .avail, .entries, .ok, .len, .sym);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_code(bitq_t code, int unsigned tail, logic [7:0] exp_sym, string what);
    bitq_t w = code;
    repeat (tail) w.push_back(bit'($urandom));
    win = '0;
    for (int i = 0; i < w.size() && i < 16; i++) win[15-i] = w[i];
    for (int a = 0; a <= 20; a++) begin
      avail = 6'(a);
      #1;
      checks++;
      if (ok !== (a >= code.size())) begin
        failures++; $display("FAIL %s ok avail=%0d", what, a);
      end
    end
    checks += 2;
    if (len !== 5'(code.size())) begin failures++; $display("FAIL %s len %0d exp %0d", what, len, code.size()); end
    if (sym !== exp_sym) begin failures++; $display("FAIL %s sym %b exp %b", what, sym, exp_sym); end
  endtask

  task automatic run();
    entries = EX_DICT;
    for (int i = 0; i < 10; i++)
      check_code(str_bits(EX_MASK_CODES[i]), 0, EX_SYMS[i], $sformatf("example %0d", i));
    for (int n = 0; n < 600; n++) begin
      bitq_t c;
      logic [7:0] s;
      int unsigned kind, idx, pos, mask;
      entries[0] = 8'($urandom); entries[1] = 8'($urandom);
      kind = $urandom % 3; idx = $urandom % 2; pos = $urandom % 4; mask = $urandom % 4;
      seen[kind]++;
      case (kind)
        0: begin
          s = 8'($urandom);
          c.push_back(1'b1);
          for (int b = 7; b >= 0; b--) c.push_back(s[b]);
        end
        1: begin
          s = entries[idx];
          c.push_back(1'b0); c.push_back(1'b1); c.push_back(bit'(idx));
        end
        default: begin
          s = entries[idx];
          if (mask[1]) s[7 - 2*pos]     = ~s[7 - 2*pos];
          if (mask[0]) s[7 - 2*pos - 1] = ~s[7 - 2*pos - 1];
          c.push_back(1'b0); c.push_back(1'b0);
          c.push_back(bit'(pos / 2)); c.push_back(bit'(pos % 2));
          c.push_back(bit'(mask / 2)); c.push_back(bit'(mask % 2));
          c.push_back(bit'(idx));
        end
      endcase
      check_code(c, 16 - c.size(), s, $sformatf("random %0d kind %0d", n, kind));
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
      failures++; $display("FAIL a code format was never tried");
    end
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
