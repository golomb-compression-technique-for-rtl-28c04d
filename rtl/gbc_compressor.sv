// gbc_compressor: the coding step of the compression side.
//
// For a dictionary that has already been chosen and loaded, this turns an
// input stream into the compressed byte stream:
//   MODE_DICT, MODE_BITMASK  symbols on (sym_valid, sym_ready, sym_data) are
//                            coded by gbc_symbol_encoder, one per cycle;
//   MODE_GOLOMB              bits on (bit_valid, bit_ready, bit_data) are
//                            run-length coded by gbc_golomb_encoder.
// The codewords are packed into bytes, most significant bit first, and leave
// on (byte_valid, byte_ready, byte_data).  Raising `flush` after the last
// input pads and sends the final partial byte.  `mode` must stay constant
// while a stream is coded.  The choice of dictionary entries and bitmasks
// and the placement of the codes in memory are offline steps outside this
// block.  Mode selection and interfaces are this design's choice.
module gbc_compressor #(
  parameter int unsigned SYM_W    = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D   = gbc_pkg::DICT_D,
  parameter int unsigned MASK_W   = gbc_pkg::MASK_W,
  parameter int unsigned GOLOMB_M = gbc_pkg::GOLOMB_M,
  parameter int unsigned WIN_W    = gbc_pkg::WIN_W,
  parameter int unsigned BUF_W    = gbc_pkg::BUF_W,
  parameter int unsigned RUN_W    = gbc_pkg::RUN_W,
  localparam int unsigned IDX_W   = (DICT_D > 1) ? $clog2(DICT_D) : 1,
  localparam int unsigned LEN_W   = $clog2(WIN_W + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  gbc_pkg::mode_e       mode,
  input  logic                 dict_we,
  input  logic [IDX_W-1:0]     dict_addr,
  input  logic [SYM_W-1:0]     dict_wdata,
  input  logic                 sym_valid,
  output logic                 sym_ready,
  input  logic [SYM_W-1:0]     sym_data,
  input  logic                 bit_valid,
  output logic                 bit_ready,
  input  logic                 bit_data,
  input  logic                 flush,
  output logic                 byte_valid,
  input  logic                 byte_ready,
  output logic [7:0]           byte_data
);

  logic [SYM_W-1:0] entries [DICT_D];
  logic [WIN_W-1:0] sym_code, run_code, pk_code;
  logic [LEN_W-1:0] sym_len, run_len, pk_len;
  logic             run_valid, run_ready, pk_valid, pk_ready;
  logic             golomb;

  assign golomb = (mode == gbc_pkg::MODE_GOLOMB);

  gbc_dictionary #(.SYM_W(SYM_W), .DICT_D(DICT_D)) u_dict (
    .clk, .rst_n, .we(dict_we), .waddr(dict_addr), .wdata(dict_wdata), .entries
  );

  gbc_symbol_encoder #(.SYM_W(SYM_W), .DICT_D(DICT_D), .MASK_W(MASK_W), .WIN_W(WIN_W)) u_senc (
    .use_bitmask(mode == gbc_pkg::MODE_BITMASK), .sym(sym_data), .entries,
    .code(sym_code), .len(sym_len)
  );

  gbc_golomb_encoder #(.GOLOMB_M(GOLOMB_M), .WIN_W(WIN_W), .RUN_W(RUN_W)) u_genc (
    .clk, .rst_n,
    .bit_valid(bit_valid && golomb), .bit_ready(bit_ready), .bit_data,
    .code_valid(run_valid), .code_ready(run_ready), .code(run_code), .len(run_len)
  );

  assign pk_valid  = golomb ? run_valid : sym_valid;
  assign pk_code   = golomb ? run_code  : sym_code;
  assign pk_len    = golomb ? run_len   : sym_len;
  assign run_ready = golomb && pk_ready;
  assign sym_ready = !golomb && pk_ready;

  gbc_bit_packer #(.ACC_W(BUF_W), .WIN_W(WIN_W)) u_pack (
    .clk, .rst_n, .flush,
    .code_valid(pk_valid), .code_ready(pk_ready), .code(pk_code), .len(pk_len),
    .byte_valid, .byte_ready, .byte_data
  );

endmodule
