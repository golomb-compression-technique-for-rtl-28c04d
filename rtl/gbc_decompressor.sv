// gbc_decompressor: the run-time decompression engine.
//
// Compressed bytes from memory enter gbc_bit_buffer, which keeps the next
// code aligned at the top of a WIN_W-bit window.  One decoder per scheme
// watches the window:
//   MODE_DICT     gbc_dict_decoder     -> symbols on (sym_valid, sym_ready, sym_data)
//   MODE_BITMASK  gbc_bitmask_decoder  -> symbols on the same port
//   MODE_GOLOMB   gbc_golomb_decoder   -> bits on (bit_valid, bit_ready, bit_data)
// and the selected decoder's code length is fed back as the number of bits
// the buffer drops.  In the symbol modes one code is decoded per cycle
// whenever it is complete in the buffer and the output register is free or
// being read; the symbol appears one cycle after the decode.  In Golomb mode
// the decoded run leaves one bit per cycle.  The dictionary is loaded through
// (dict_we, dict_addr, dict_wdata) before decoding.  `flush` empties the
// buffer, drops a partly decoded Golomb code and the output register; `mode`
// may change only together with a flush.  Decoder formats follow the
// original scheme; the buffer, mode selection and handshakes are this design's.
module gbc_decompressor #(
  parameter int unsigned SYM_W    = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D   = gbc_pkg::DICT_D,
  parameter int unsigned MASK_W   = gbc_pkg::MASK_W,
  parameter int unsigned GOLOMB_M = gbc_pkg::GOLOMB_M,
  parameter int unsigned WIN_W    = gbc_pkg::WIN_W,
  parameter int unsigned BUF_W    = gbc_pkg::BUF_W,
  parameter int unsigned RUN_W    = gbc_pkg::RUN_W,
  localparam int unsigned IDX_W   = (DICT_D > 1) ? $clog2(DICT_D) : 1,
  localparam int unsigned LEN_W   = $clog2(WIN_W + 1),
  localparam int unsigned AV_W    = $clog2(BUF_W + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  gbc_pkg::mode_e       mode,
  input  logic                 dict_we,
  input  logic [IDX_W-1:0]     dict_addr,
  input  logic [SYM_W-1:0]     dict_wdata,
  input  logic                 flush,
  input  logic                 byte_valid,
  output logic                 byte_ready,
  input  logic [7:0]           byte_data,
  output logic                 sym_valid,
  input  logic                 sym_ready,
  output logic [SYM_W-1:0]     sym_data,
  output logic                 bit_valid,
  input  logic                 bit_ready,
  output logic                 bit_data
);

  logic [SYM_W-1:0] entries [DICT_D];
  logic [WIN_W-1:0] win;
  logic [AV_W-1:0]  avail;
  logic [LEN_W-1:0] consume;
  logic             d_ok, m_ok;
  logic [LEN_W-1:0] d_len, m_len, g_consume;
  logic [SYM_W-1:0] d_sym, m_sym;
  logic             sel_ok, fire, golomb;
  logic [LEN_W-1:0] sel_len;
  logic [SYM_W-1:0] sel_sym;

  gbc_dictionary #(.SYM_W(SYM_W), .DICT_D(DICT_D)) u_dict (
    .clk, .rst_n, .we(dict_we), .waddr(dict_addr), .wdata(dict_wdata), .entries
  );

  gbc_bit_buffer #(.BUF_W(BUF_W), .WIN_W(WIN_W)) u_buf (
    .clk, .rst_n, .flush,
    .in_valid(byte_valid), .in_ready(byte_ready), .in_byte(byte_data),
    .win, .avail, .consume
  );

  gbc_dict_decoder #(.SYM_W(SYM_W), .DICT_D(DICT_D), .WIN_W(WIN_W), .AV_W(AV_W)) u_ddec (
    .win, .avail, .entries, .ok(d_ok), .len(d_len), .sym(d_sym)
  );

  gbc_bitmask_decoder #(.SYM_W(SYM_W), .DICT_D(DICT_D), .MASK_W(MASK_W), .WIN_W(WIN_W),
                        .AV_W(AV_W)) u_mdec (
    .win, .avail, .entries, .ok(m_ok), .len(m_len), .sym(m_sym)
  );

  assign golomb = (mode == gbc_pkg::MODE_GOLOMB);

  gbc_golomb_decoder #(.GOLOMB_M(GOLOMB_M), .WIN_W(WIN_W), .AV_W(AV_W), .RUN_W(RUN_W)) u_gdec (
    .clk, .rst_n, .flush, .en(golomb), .win, .avail, .consume(g_consume),
    .bit_valid, .bit_ready, .bit_data
  );

  always_comb begin
    unique case (mode)
      gbc_pkg::MODE_BITMASK: begin sel_ok = m_ok;  sel_len = m_len; sel_sym = m_sym; end
      gbc_pkg::MODE_DICT:    begin sel_ok = d_ok;  sel_len = d_len; sel_sym = d_sym; end
      default:               begin sel_ok = 1'b0;  sel_len = '0;    sel_sym = d_sym; end
    endcase
    fire    = sel_ok && !flush && (!sym_valid || sym_ready);
    consume = golomb ? g_consume : (fire ? sel_len : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      sym_data  <= '0;
    end else if (flush) begin
      sym_valid <= 1'b0;
    end else if (fire) begin
      sym_valid <= 1'b1;
      sym_data  <= sel_sym;
    end else if (sym_ready) begin
      sym_valid <= 1'b0;
    end
  end

endmodule
