// gbc_golomb_decoder: Golomb run-length decoder.
//
// A Golomb codeword with group size M (a power of two) is a unary group
// prefix - q ones closed by a zero - followed by a log2(M)-bit tail r.  It
// stands for a run of q*M + r zeros closed by a one.  The decoder reads the
// codeword from the aligned input window (first bit at the MSB of `win`,
// `avail` bits valid), tells the input buffer how many bits it used through
// `consume`, and then emits the run as a bit stream: q*M + r zeros and a one,
// one bit per accepted cycle on (bit_valid, bit_ready, bit_data).
//
// Decoding takes one cycle per codeword when the whole codeword is in the
// window.  A prefix longer than the window is taken in pieces: while the
// valid bits are all ones, or the codeword would run past the window, the
// ones are consumed and added to the group count, so
// runs of any length up to 2^RUN_W-1 are handled.  The next codeword is read
// in the cycle after the closing one has been emitted.  `en` selects Golomb
// mode (otherwise nothing is consumed); `flush` drops a partly decoded code.
// The code structure is the original scheme's; the sequencing is this design's.
module gbc_golomb_decoder #(
  parameter int unsigned GOLOMB_M = gbc_pkg::GOLOMB_M,
  parameter int unsigned WIN_W    = gbc_pkg::WIN_W,
  parameter int unsigned AV_W     = $clog2(gbc_pkg::BUF_W + 1),
  parameter int unsigned RUN_W    = gbc_pkg::RUN_W,
  localparam int unsigned TAIL_W  = $clog2(GOLOMB_M),
  localparam int unsigned LEN_W   = $clog2(WIN_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              en,
  input  logic [WIN_W-1:0]  win,
  input  logic [AV_W-1:0]   avail,
  output logic [LEN_W-1:0]  consume,
  output logic              bit_valid,
  input  logic              bit_ready,
  output logic              bit_data
);

  typedef enum logic {S_DECODE, S_EMIT} state_e;

  state_e            state_q;
  logic [RUN_W-1:0]  groups_q;   // prefix ones seen so far
  logic [RUN_W-1:0]  remain_q;   // zeros still to emit
  logic [LEN_W-1:0]  lead;       // leading ones in the valid window bits
  logic              zero_seen;  // a closing zero is in the valid bits
  logic [LEN_W-1:0]  win_valid;  // min(avail, WIN_W)
  logic [WIN_W-1:0]  after_prefix;
  logic [TAIL_W-1:0] tail;
  logic              code_done, prefix_piece, fits;

  always_comb begin
    win_valid = (avail >= AV_W'(WIN_W)) ? LEN_W'(WIN_W) : LEN_W'(avail);
    lead      = '0;
    zero_seen = 1'b0;
    for (int i = 0; i < WIN_W; i++) begin
      if (!zero_seen && (LEN_W'(i) < win_valid)) begin
        if (win[WIN_W-1-i]) lead = lead + 1'b1;
        else                zero_seen = 1'b1;
      end
    end
    after_prefix = win << (lead + 1'b1);
    tail         = after_prefix[WIN_W-1 -: TAIL_W];
    fits         = (AV_W'(lead) + AV_W'(1 + TAIL_W) <= avail) &&
                   (int'(lead) + 1 + TAIL_W <= WIN_W);
    code_done    = en && (state_q == S_DECODE) && zero_seen && fits;
    // Ones that cannot close a code in this window are taken as a piece.
    prefix_piece = en && (state_q == S_DECODE) && (lead != '0) &&
                   (!zero_seen || (int'(lead) + 1 + TAIL_W > WIN_W));
    consume      = code_done    ? lead + LEN_W'(1 + TAIL_W) :
                   prefix_piece ? lead : '0;
  end

  assign bit_valid = (state_q == S_EMIT);
  assign bit_data  = (remain_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_DECODE;
      groups_q <= '0;
      remain_q <= '0;
    end else if (flush) begin
      state_q  <= S_DECODE;
      groups_q <= '0;
      remain_q <= '0;
    end else begin
      case (state_q)
        S_DECODE: begin
          if (code_done) begin
            remain_q <= ((groups_q + RUN_W'(lead)) * RUN_W'(GOLOMB_M)) + RUN_W'(tail);
            groups_q <= '0;
            state_q  <= S_EMIT;
          end else if (prefix_piece) begin
            groups_q <= groups_q + RUN_W'(lead);
          end
        end
        S_EMIT: begin
          if (bit_ready) begin
            if (remain_q == '0) state_q  <= S_DECODE;
            else                remain_q <= remain_q - 1'b1;
          end
        end
        default: state_q <= S_DECODE;
      endcase
    end
  end

endmodule
