// gbc_dictionary: the symbol dictionary shared by encoder and decoder.
//
// DICT_D entries of SYM_W bits, held in flip-flops so that every entry can be
// read combinationally in the same cycle: the decoders look an entry up by
// the index field of the code they are decoding, and the encoder compares a
// symbol against all entries at once.  Entries are written one per cycle
// through (we, waddr, wdata) and are visible on `entries` the next cycle.
// Reset clears all entries to zero.  The dictionary is loaded before a
// bitstream is coded; the number and width of entries follow the worked
// examples (two 8-bit entries, d = 2^i), the write port is this design's own.
module gbc_dictionary #(
  parameter int unsigned SYM_W  = gbc_pkg::SYM_W,
  parameter int unsigned DICT_D = gbc_pkg::DICT_D,
  localparam int unsigned IDX_W = (DICT_D > 1) ? $clog2(DICT_D) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [IDX_W-1:0]        waddr,
  input  logic [SYM_W-1:0]        wdata,
  output logic [SYM_W-1:0]        entries [DICT_D]
);

  logic [SYM_W-1:0] mem [DICT_D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DICT_D; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign entries = mem;

endmodule
