// gbc_bitmask_decoder: decoder for bitmask-based dictionary codes.
//
// Three code formats, first bit at the MSB of `win`:
//   '1' + SYM_W-bit symbol                      uncompressed  (9 bits)
//   '0' '1' + index                             dictionary hit (3 bits)
//   '0' '0' + position + mask + index           bitmask hit    (7 bits)
// For a bitmask hit the symbol is the dictionary entry with the MASK_W-bit
// mask XORed into bit group `position`, group 0 being the most significant.
// (Bit lengths given for the default 8-bit symbols, 2-bit masks and
// two-entry dictionary.)  Combinational: `ok` says that all `len` bits are
// present.  Formats and field order follow the original scheme's example; one mask
// per code, without a mask-count field, as in that example.
module gbc_bitmask_decoder #(
  parameter int unsigned SYM_W  = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D = gbc_pkg::DICT_D,
  parameter int unsigned MASK_W = gbc_pkg::MASK_W,
  parameter int unsigned WIN_W  = gbc_pkg::WIN_W,
  parameter int unsigned AV_W   = $clog2(gbc_pkg::BUF_W + 1),
  localparam int unsigned IDX_W = (DICT_D > 1) ? $clog2(DICT_D) : 1,
  localparam int unsigned POS_W = (SYM_W / MASK_W > 1) ? $clog2(SYM_W / MASK_W) : 1,
  localparam int unsigned LEN_W = $clog2(WIN_W + 1)
) (
  input  logic [WIN_W-1:0]  win,
  input  logic [AV_W-1:0]   avail,
  input  logic [SYM_W-1:0]  entries [DICT_D],
  output logic              ok,
  output logic [LEN_W-1:0]  len,
  output logic [SYM_W-1:0]  sym
);

  logic [IDX_W-1:0]  idx_direct, idx_mask;
  logic [POS_W-1:0]  pos;
  logic [MASK_W-1:0] mask;
  logic [SYM_W-1:0]  mask_word;

  always_comb begin
    idx_direct = win[WIN_W-3 -: IDX_W];
    pos        = win[WIN_W-3 -: POS_W];
    mask       = win[WIN_W-3-POS_W -: MASK_W];
    idx_mask   = win[WIN_W-3-POS_W-MASK_W -: IDX_W];
    mask_word  = SYM_W'(mask) << (SYM_W - MASK_W - MASK_W * int'(pos));
    if (win[WIN_W-1]) begin
      len = LEN_W'(1 + SYM_W);
      sym = win[WIN_W-2 -: SYM_W];
    end else if (win[WIN_W-2]) begin
      len = LEN_W'(2 + IDX_W);
      sym = entries[idx_direct];
    end else begin
      len = LEN_W'(2 + POS_W + MASK_W + IDX_W);
      sym = entries[idx_mask] ^ mask_word;
    end
    ok = (AV_W'(len) <= avail);
  end

endmodule
