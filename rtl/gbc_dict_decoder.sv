// gbc_dict_decoder: decoder for plain dictionary codes.
//
// A code is either '0' followed by a log2(DICT_D)-bit dictionary index (the
// symbol is that dictionary entry) or '1' followed by the SYM_W-bit symbol
// itself.  The decoder is purely combinational: it looks at the aligned bits
// in `win` (first code bit at the MSB), reports the code length `len`, the
// decoded symbol `sym`, and `ok` when all `len` bits are present
// (len <= avail).  The code format is the original scheme's; the window interface
// is this design's.
module gbc_dict_decoder #(
  parameter int unsigned SYM_W  = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D = gbc_pkg::DICT_D,
  parameter int unsigned WIN_W  = gbc_pkg::WIN_W,
  parameter int unsigned AV_W   = $clog2(gbc_pkg::BUF_W + 1),
  localparam int unsigned IDX_W = (DICT_D > 1) ? $clog2(DICT_D) : 1,
  localparam int unsigned LEN_W = $clog2(WIN_W + 1)
) (
  input  logic [WIN_W-1:0]  win,
  input  logic [AV_W-1:0]   avail,
  input  logic [SYM_W-1:0]  entries [DICT_D],
  output logic              ok,
  output logic [LEN_W-1:0]  len,
  output logic [SYM_W-1:0]  sym
);

  logic [IDX_W-1:0] idx;

  always_comb begin
    idx = win[WIN_W-2 -: IDX_W];
    if (!win[WIN_W-1]) begin
      len = LEN_W'(1 + IDX_W);
      sym = entries[idx];
    end else begin
      len = LEN_W'(1 + SYM_W);
      sym = win[WIN_W-2 -: SYM_W];
    end
    ok = (AV_W'(len) <= avail);
  end

endmodule
