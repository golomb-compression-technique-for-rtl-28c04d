// gbc_top: dictionary / bitmask / Golomb bitstream codec.
//
// The two halves of the compression framework, side by side:
//   compression side  gbc_compressor codes a symbol stream (dictionary or
//                     bitmask codes) or a bit stream (Golomb run-length
//                     codes) into bytes, c_* ports;
//   run-time side     gbc_decompressor takes those bytes back from memory and
//                     restores the symbols or bits, d_* ports.
// The configuration memory that would sit between c_byte_* and d_byte_* is
// outside this design, so both byte streams are ports.  `mode` selects the
// scheme for both halves and the dictionary load port (dict_we, dict_addr,
// dict_wdata) writes the same entry into both dictionaries, so that a stream
// compressed here decompresses here.  All streams use valid/ready; reset is
// asynchronous and active low.  Latency: see the two halves.
module gbc_top #(
  parameter int unsigned SYM_W    = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D   = gbc_pkg::DICT_D,
  parameter int unsigned MASK_W   = gbc_pkg::MASK_W,
  parameter int unsigned GOLOMB_M = gbc_pkg::GOLOMB_M,
  parameter int unsigned WIN_W    = gbc_pkg::WIN_W,
  parameter int unsigned BUF_W    = gbc_pkg::BUF_W,
  parameter int unsigned RUN_W    = gbc_pkg::RUN_W,
  localparam int unsigned IDX_W   = (DICT_D > 1) ? $clog2(DICT_D) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  gbc_pkg::mode_e       mode,
  input  logic                 dict_we,
  input  logic [IDX_W-1:0]     dict_addr,
  input  logic [SYM_W-1:0]     dict_wdata,
  // compression side
  input  logic                 c_sym_valid,
  output logic                 c_sym_ready,
  input  logic [SYM_W-1:0]     c_sym_data,
  input  logic                 c_bit_valid,
  output logic                 c_bit_ready,
  input  logic                 c_bit_data,
  input  logic                 c_flush,
  output logic                 c_byte_valid,
  input  logic                 c_byte_ready,
  output logic [7:0]           c_byte_data,
  // decompression side
  input  logic                 d_flush,
  input  logic                 d_byte_valid,
  output logic                 d_byte_ready,
  input  logic [7:0]           d_byte_data,
  output logic                 d_sym_valid,
  input  logic                 d_sym_ready,
  output logic [SYM_W-1:0]     d_sym_data,
  output logic                 d_bit_valid,
  input  logic                 d_bit_ready,
  output logic                 d_bit_data
);

  gbc_compressor #(
    .SYM_W(SYM_W), .DICT_D(DICT_D), .MASK_W(MASK_W), .GOLOMB_M(GOLOMB_M),
    .WIN_W(WIN_W), .BUF_W(BUF_W), .RUN_W(RUN_W)
  ) u_comp (
    .clk, .rst_n, .mode, .dict_we, .dict_addr, .dict_wdata,
    .sym_valid(c_sym_valid), .sym_ready(c_sym_ready), .sym_data(c_sym_data),
    .bit_valid(c_bit_valid), .bit_ready(c_bit_ready), .bit_data(c_bit_data),
    .flush(c_flush),
    .byte_valid(c_byte_valid), .byte_ready(c_byte_ready), .byte_data(c_byte_data)
  );

  gbc_decompressor #(
    .SYM_W(SYM_W), .DICT_D(DICT_D), .MASK_W(MASK_W), .GOLOMB_M(GOLOMB_M),
    .WIN_W(WIN_W), .BUF_W(BUF_W), .RUN_W(RUN_W)
  ) u_decomp (
    .clk, .rst_n, .mode, .dict_we, .dict_addr, .dict_wdata,
    .flush(d_flush),
    .byte_valid(d_byte_valid), .byte_ready(d_byte_ready), .byte_data(d_byte_data),
    .sym_valid(d_sym_valid), .sym_ready(d_sym_ready), .sym_data(d_sym_data),
    .bit_valid(d_bit_valid), .bit_ready(d_bit_ready), .bit_data(d_bit_data)
  );

endmodule
