// gbc_tb_pkg: helpers shared by the codec testbenches.
//
// Bit strings are held as queues of bits, first bit first.  str_bits turns
// a string of '0'/'1' characters (other characters ignored) into such a
// queue, which keeps the worked examples readable.  The example data set is
// the ten 8-bit symbols coded against a two-entry dictionary
// {00000000, 01000010}, with the plain dictionary codes and the bitmask codes
// expected for it, and a bit string with its Golomb (m = 4) codes.
package gbc_tb_pkg;

  typedef bit bitq_t[$];

  function automatic bitq_t str_bits(string s);
    bitq_t q;
    for (int i = 0; i < s.len(); i++) begin
      if (s.getc(i) == "0") q.push_back(1'b0);
      else if (s.getc(i) == "1") q.push_back(1'b1);
    end
    return q;
  endfunction

  localparam logic [7:0] EX_DICT [2] = '{8'b00000000, 8'b01000010};

  localparam logic [7:0] EX_SYMS [10] = '{
    8'b00000000, 8'b10000010, 8'b00000010, 8'b01000010, 8'b01001110,
    8'b01010010, 8'b00001100, 8'b01000010, 8'b11000000, 8'b00000000};

  // Plain dictionary codes: '0'+index or '1'+symbol.
  localparam string EX_DICT_CODES [10] = '{
    "0 0", "1 10000010", "1 00000010", "0 1", "1 01001110",
    "1 01010010", "1 00001100", "0 1", "1 11000000", "0 0"};

  // Bitmask codes: '01'+index, '00'+position+mask+index, '1'+symbol.
  localparam string EX_MASK_CODES [10] = '{
    "0 1 0", "0 0 00 11 1", "0 0 11 10 0", "0 1 1", "0 0 10 11 1",
    "0 0 01 01 1", "0 0 10 11 0", "0 1 1", "0 0 00 11 0", "0 1 0"};

  // Golomb example, m = 4: runs 1,6,3,5,2,0.
  localparam string EX_RUN_DATA  = "01 0000001 0001 000001 001 1";
  localparam string EX_RUN_CODES = "001 1010 011 1001 010 000";

  // Golomb code of one run, m = 4, computed the long way round.
  function automatic bitq_t golomb4(int unsigned run);
    bitq_t q;
    for (int unsigned k = 0; k < run / 4; k++) q.push_back(1'b1);
    q.push_back(1'b0);
    q.push_back(bit'((run % 4) / 2));
    q.push_back(bit'(run % 2));
    return q;
  endfunction

endpackage
