// gbc_bit_buffer: input buffer of the decompression engine.
//
// Compressed codes have different lengths, so the next code can start at any
// bit of the incoming bytes.  This buffer holds up to BUF_W bits,
// left-aligned: the oldest bit is always at the MSB, and `win` shows the
// WIN_W oldest bits with `avail` telling how many bits are valid.  Each cycle
// the decoder states in `consume` how many bits it has used; the buffer
// shifts them out (a barrel shift by 0..WIN_W) and, in the same cycle,
// appends an incoming byte behind the remaining bits (a second barrel shift).
// Unused low bits are kept at zero so that the append is an OR.
//
// Interface: bytes arrive with valid/ready, most significant bit first.  A
// byte is accepted when at most BUF_W-8 bits are held; ready does not
// depend on `consume`.  `consume` must not exceed `avail`.  `flush` empties
// the buffer.  A byte accepted in cycle t is visible in `win` in cycle t+1.
// The need for a barrel-shifted input buffer for variable-length codes is
// from the original scheme; the buffer organisation and handshake are this
// design's choice.
module gbc_bit_buffer #(
  parameter int unsigned BUF_W = gbc_pkg::BUF_W,
  parameter int unsigned WIN_W = gbc_pkg::WIN_W,
  localparam int unsigned CNT_W = $clog2(BUF_W + 1),
  localparam int unsigned CON_W = $clog2(WIN_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_byte,
  output logic [WIN_W-1:0]  win,
  output logic [CNT_W-1:0]  avail,
  input  logic [CON_W-1:0]  consume
);

  logic [BUF_W-1:0] buf_q, shifted, appended;
  logic [CNT_W-1:0] cnt_q, cnt_left;
  logic             take;

  assign in_ready = (cnt_q <= CNT_W'(BUF_W - 8)) && !flush;
  assign take     = in_valid && in_ready;
  assign win      = buf_q[BUF_W-1 -: WIN_W];
  assign avail    = cnt_q;

  always_comb begin
    shifted  = buf_q << consume;
    cnt_left = cnt_q - CNT_W'(consume);
    appended = shifted;
    if (take)
      appended = shifted | (BUF_W'(in_byte) << (CNT_W'(BUF_W - 8) - cnt_left));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      buf_q <= appended;
      cnt_q <= cnt_left + (take ? CNT_W'(8) : CNT_W'(0));
    end
  end

  consume_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    CNT_W'(consume) <= cnt_q);

endmodule
