// gbc_symbol_encoder: codes one symbol against the dictionary.
//
// With use_bitmask = 0 it produces plain dictionary codes: '0' + index when
// the symbol equals an entry, otherwise '1' + the symbol.  With
// use_bitmask = 1 it produces bitmask codes:
//   '0' '1' + index                    symbol equals an entry
//   '0' '0' + position + mask + index  symbol differs from an entry only
//                                      inside one MASK_W-bit group
//   '1' + symbol                       anything else
// Group 0 is the most significant group; the mask is the XOR of symbol and
// entry in that group.  An exact match wins over a bitmask match, and a lower
// index over a higher one.  Purely combinational: `code` holds the codeword
// left-aligned (first bit at the MSB, unused low bits zero) and `len` its
// length.  The formats are the original scheme's; the tie-break order is this
// design's choice.
module gbc_symbol_encoder #(
  parameter int unsigned SYM_W  = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D = gbc_pkg::DICT_D,
  parameter int unsigned MASK_W = gbc_pkg::MASK_W,
  parameter int unsigned WIN_W  = gbc_pkg::WIN_W,
  localparam int unsigned IDX_W = (DICT_D > 1) ? $clog2(DICT_D) : 1,
  localparam int unsigned NPOS  = SYM_W / MASK_W,
  localparam int unsigned POS_W = (NPOS > 1) ? $clog2(NPOS) : 1,
  localparam int unsigned LEN_W = $clog2(WIN_W + 1)
) (
  input  logic              use_bitmask,
  input  logic [SYM_W-1:0]  sym,
  input  logic [SYM_W-1:0]  entries [DICT_D],
  output logic [WIN_W-1:0]  code,
  output logic [LEN_W-1:0]  len
);

  logic              exact_hit, mask_hit;
  logic [IDX_W-1:0]  exact_idx, mask_idx;
  logic [POS_W-1:0]  mask_pos;
  logic [MASK_W-1:0] mask_val;
  logic [SYM_W-1:0]  diff, group;
  logic [WIN_W-1:0]  raw;   // codeword right-aligned

  always_comb begin
    exact_hit = 1'b0;
    exact_idx = '0;
    mask_hit  = 1'b0;
    mask_idx  = '0;
    mask_pos  = '0;
    mask_val  = '0;
    // Scan from the highest index down so that the lowest index is kept.
    for (int i = DICT_D - 1; i >= 0; i--) begin
      diff = sym ^ entries[i];
      if (diff == '0) begin
        exact_hit = 1'b1;
        exact_idx = IDX_W'(i);
      end
      for (int p = NPOS - 1; p >= 0; p--) begin
        group = {{(SYM_W-MASK_W){1'b0}}, {MASK_W{1'b1}}} << (SYM_W - MASK_W - MASK_W * p);
        if ((diff & ~group) == '0 && diff != '0) begin
          mask_hit = 1'b1;
          mask_idx = IDX_W'(i);
          mask_pos = POS_W'(p);
          mask_val = MASK_W'((diff & group) >> (SYM_W - MASK_W - MASK_W * p));
        end
      end
    end

    if (use_bitmask) begin
      if (exact_hit) begin
        raw = WIN_W'({2'b01, exact_idx});
        len = LEN_W'(2 + IDX_W);
      end else if (mask_hit) begin
        raw = WIN_W'({2'b00, mask_pos, mask_val, mask_idx});
        len = LEN_W'(2 + POS_W + MASK_W + IDX_W);
      end else begin
        raw = WIN_W'({1'b1, sym});
        len = LEN_W'(1 + SYM_W);
      end
    end else begin
      if (exact_hit) begin
        raw = WIN_W'({1'b0, exact_idx});
        len = LEN_W'(1 + IDX_W);
      end else begin
        raw = WIN_W'({1'b1, sym});
        len = LEN_W'(1 + SYM_W);
      end
    end
    code = raw << (LEN_W'(WIN_W) - len);
  end

endmodule
