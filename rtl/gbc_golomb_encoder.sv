// gbc_golomb_encoder: Golomb run-length encoder.
//
// Bits arrive one per accepted cycle.  Each zero adds one to the current run;
// a one closes the run, of length L = q*M + r, and the encoder emits the
// codeword: q ones, a zero, and r as a log2(M)-bit binary tail (group A_k
// with k = q+1 has prefix of k-1 ones and a zero).  The input stalls while a
// codeword is being sent.
//
// Codewords leave left-aligned on `code` (first bit at the MSB) with their
// length on `len`, under a valid/ready handshake.  A prefix longer than
// CHUNK = WIN_W-1-log2(M) ones is sent as pieces of CHUNK ones first; the
// last piece carries the remaining ones, the zero and the tail.  A bit
// accepted in cycle t produces its (first) codeword piece in cycle t+1.
// Zeros after the last one are not coded until a one closes them.  The code
// is the original scheme's; chunking and handshake are this design's choice.
module gbc_golomb_encoder #(
  parameter int unsigned GOLOMB_M = gbc_pkg::GOLOMB_M,
  parameter int unsigned WIN_W    = gbc_pkg::WIN_W,
  parameter int unsigned RUN_W    = gbc_pkg::RUN_W,
  localparam int unsigned TAIL_W  = $clog2(GOLOMB_M),
  localparam int unsigned CHUNK   = WIN_W - 1 - TAIL_W,
  localparam int unsigned LEN_W   = $clog2(WIN_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_valid,
  output logic              bit_ready,
  input  logic              bit_data,
  output logic              code_valid,
  input  logic              code_ready,
  output logic [WIN_W-1:0]  code,
  output logic [LEN_W-1:0]  len
);

  logic [RUN_W-1:0]  run_q;      // zeros counted in the open run
  logic [RUN_W-1:0]  groups_q;   // prefix ones still to send
  logic [TAIL_W-1:0] tail_q;
  logic              pending_q;  // a closed run is being sent
  logic              last_piece;
  logic [WIN_W-1:0]  ones;

  assign bit_ready  = !pending_q;
  assign code_valid = pending_q;
  assign last_piece = (groups_q <= RUN_W'(CHUNK));

  always_comb begin
    ones = '0;
    if (last_piece) begin
      // groups_q ones, a zero, then the tail, all left-aligned
      ones = ~({WIN_W{1'b1}} >> groups_q);
      code = ones | ((WIN_W'(tail_q) << (WIN_W - TAIL_W)) >> (groups_q + 1'b1));
      len  = LEN_W'(groups_q) + LEN_W'(1 + TAIL_W);
    end else begin
      code = ~({WIN_W{1'b1}} >> CHUNK);
      len  = LEN_W'(CHUNK);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= '0;
      groups_q  <= '0;
      tail_q    <= '0;
      pending_q <= 1'b0;
    end else if (pending_q) begin
      if (code_ready) begin
        if (last_piece) pending_q <= 1'b0;
        else            groups_q  <= groups_q - RUN_W'(CHUNK);
      end
    end else if (bit_valid) begin
      if (bit_data) begin
        groups_q  <= run_q >> TAIL_W;
        tail_q    <= run_q[TAIL_W-1:0];
        run_q     <= '0;
        pending_q <= 1'b1;
      end else begin
        run_q <= run_q + 1'b1;
      end
    end
  end

  run_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (bit_valid && bit_ready && !bit_data) |-> (run_q != '1));

endmodule
