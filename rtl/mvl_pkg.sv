// mvl_pkg: types and constants shared by the multiple-valued logic circuits.
//
// Every multiple-valued signal is carried in binary: a 3-valued digit (a
// "trit") uses two wires holding the unsigned values 0, 1 or 2; code 3 is
// unused. The 4-valued state of the sample sequential circuit is coded as two
// trits (q0, q1): q = 0, 1, 2 -> (0, 0), (0, 1), (0, 2) and q = 3 -> (1, 0).
// Code (2, x) is unused and is read as q = 3. The binary carrying of digits is
// this design's choice; the two-trit state code is the one of the mapping
// example it implements.
package mvl_pkg;

  // One 3-valued digit, values 0..2.
  typedef logic [1:0] trit_t;

  // A 4-valued value, 0..3.
  typedef logic [1:0] quad_t;

  // Two-trit code of a 4-valued state value.
  typedef struct packed {
    trit_t q0;  // most significant digit: 0 for q = 0..2, 1 for q = 3
    trit_t q1;  // least significant digit: q for q = 0..2, 0 for q = 3
  } state_code_t;

  // Encode a 4-valued value into the two-trit state code.
  function automatic state_code_t encode_state(quad_t q);
    state_code_t c;
    if (q == 2'd3) begin
      c.q0 = 2'd1;
      c.q1 = 2'd0;
    end else begin
      c.q0 = 2'd0;
      c.q1 = q;
    end
    return c;
  endfunction

  // Decode a two-trit state code; any q0 other than 0 means q = 3.
  function automatic quad_t decode_state(state_code_t c);
    return (c.q0 != 2'd0) ? 2'd3 : c.q1;
  endfunction

endpackage
