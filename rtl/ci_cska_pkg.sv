// Shared types and helpers for the hybrid concatenation-and-incrementation
// carry-skip adder (CI_CSKA).
//
// gp_t is the (generate, propagate) pair that the carry lookahead blocks and
// the Kogge-Stone prefix network pass around. The skip logic alternates
// between AOI and OAI gates, so the carry between two stages is carried in
// true or in complemented form depending on the stage number; the functions
// below give that polarity so that every block agrees on it.
//
// Stage numbering follows the adder's own numbering: stage 1 holds the least
// significant bits and receives the adder carry-in; stage 1 has no skip logic
// and hands a true carry to stage 2. The skip logic of stage j >= 2 inverts
// the carry, so the carry leaving an even stage is complemented and the one
// leaving an odd stage is true.
package ci_cska_pkg;

  typedef struct packed {
    logic g;  // group/bit generate
    logic p;  // group/bit propagate
  } gp_t;

  // Prefix operator: combines a more significant group (hi) with the
  // adjacent less significant group (lo).
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // 1 when the carry leaving stage j is in complemented form.
  function automatic bit carry_out_inverted(int j);
    return (j >= 2) && (j % 2 == 0);
  endfunction

  // 1 when stage j's skip logic is the OAI form (its carry-in is
  // complemented, its carry-out true); 0 for the AOI form.
  function automatic bit skip_is_oai(int j);
    return (j >= 3) && (j % 2 == 1);
  endfunction

endpackage
