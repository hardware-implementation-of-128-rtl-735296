// aes_rcon: round-constant table for the key schedule.
//
// INVERSE = 0 gives R-con, RC[j] for j = 1..10:
//   01 02 04 08 10 20 40 80 1B 36
// INVERSE = 1 gives IR-con, the same constants in reverse order, used when
// the key schedule is run backwards from the last round key:
//   36 1B 80 40 20 10 08 04 02 01
// The table is computed at elaboration as RC[1] = 01, RC[j] = {02}*RC[j-1].
// Index values outside 1..10 give 00. Combinational.
// Both constant sequences are the design's; the zero outside 1..10 is this
// RTL's choice.
module aes_rcon
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0  // 0: R-con, 1: IR-con
) (
  input  logic [3:0] round,  // round number j, 1..10
  output byte_t      rc      // round constant
);
  function automatic logic [15:0][7:0] gen_table();
    logic [15:0][7:0] t;
    for (int j = 0; j < 16; j++) begin
      if (j >= 1 && j <= NUM_ROUNDS)
        t[j] = rcon(INVERSE ? NUM_ROUNDS + 1 - j : j);
      else
        t[j] = 8'h00;
    end
    return t;
  endfunction

  localparam logic [15:0][7:0] TABLE = gen_table();

  assign rc = TABLE[round];
endmodule
