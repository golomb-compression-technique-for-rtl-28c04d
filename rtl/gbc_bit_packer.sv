// gbc_bit_packer: packs variable-length codewords into bytes.
//
// Memory and bus are byte-wide, so the codewords produced by the encoders
// are concatenated, most significant bit first, and sent out eight bits at a
// time.  An accumulator of ACC_W bits holds the pending bits left-aligned; a
// codeword (left-aligned in `code`, `len` bits long) is accepted when at
// most ACC_W-WIN_W bits are pending, and a byte is offered whenever eight or
// more are pending.  While `flush` is high and no codeword is offered, a
// final partial byte is sent padded with zeros.  A codeword accepted in cycle
// t can leave as a byte from cycle t+1.  Byte-wide output is from the
// original scheme; packing order, padding and handshake are this design's choice.
module gbc_bit_packer #(
  parameter int unsigned ACC_W = gbc_pkg::BUF_W,
  parameter int unsigned WIN_W = gbc_pkg::WIN_W,
  localparam int unsigned CNT_W = $clog2(ACC_W + 1),
  localparam int unsigned LEN_W = $clog2(WIN_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              code_valid,
  output logic              code_ready,
  input  logic [WIN_W-1:0]  code,
  input  logic [LEN_W-1:0]  len,
  output logic              byte_valid,
  input  logic              byte_ready,
  output logic [7:0]        byte_data
);

  logic [ACC_W-1:0] acc_q, acc_next;
  logic [CNT_W-1:0] cnt_q, cnt_left;
  logic             take, send;
  logic [WIN_W-1:0] code_bits;   // code with bits beyond len cleared

  assign code_ready = (cnt_q <= CNT_W'(ACC_W - WIN_W));
  assign take       = code_valid && code_ready;
  assign byte_valid = (cnt_q >= CNT_W'(8)) ||
                      (flush && !code_valid && (cnt_q != '0));
  assign byte_data  = acc_q[ACC_W-1 -: 8];
  assign send       = byte_valid && byte_ready;

  assign code_bits = code & ~({WIN_W{1'b1}} >> len);

  always_comb begin
    acc_next = acc_q;
    cnt_left = cnt_q;
    if (send) begin
      acc_next = acc_q << 8;
      cnt_left = (cnt_q >= CNT_W'(8)) ? cnt_q - CNT_W'(8) : '0;
    end
    if (take) begin
      acc_next = acc_next | ((ACC_W'(code_bits) << (ACC_W - WIN_W)) >> cnt_left);
      cnt_left = cnt_left + CNT_W'(len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else begin
      acc_q <= acc_next;
      cnt_q <= cnt_left;
    end
  end

endmodule
