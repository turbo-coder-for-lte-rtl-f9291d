// turbo_pkg: constants, types and trellis helpers shared by the LTE turbo
// encoder and the Log-MAP turbo decoder.
//
// The constituent code is the LTE rate-1/2 recursive systematic
// convolutional code with feedback polynomial g0 = 1 + D^2 + D^3 and
// feed-forward polynomial g1 = 1 + D + D^3 (8 states). A state is the
// 3-bit register contents {r1, r2, r3}, r1 being the most recent feedback
// bit, stored as index s = 4*r1 + 2*r2 + r3. For input bit u:
//   a  = u ^ r2 ^ r3          (feedback bit)
//   p  = a ^ r1 ^ r3          (parity bit)
//   s' = {a, r1, r2}
// The polynomials are the LTE standard ones; the design document states only
// that the code is the rate-1/3 LTE turbo code.
//
// Soft values follow the convention L = ln(P(bit=1)/P(bit=0)), so a
// positive value favours a one. Branch metrics are u*(Ls+La) + p*Lp,
// which differs from the symmetric form only by a per-step constant that
// cancels in every LLR.
package turbo_pkg;

  localparam int unsigned NSTATES = 8;

  // Next state of the constituent encoder.
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  // Parity bit produced when input u is applied in state s.
  function automatic logic rsc_parity(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Branch entering state ns from predecessor j (0 or 1): from
  // s' = {a, r1, r2} the predecessor is {r1, r2, r3} with r3 = j free; the
  // branch carries input bit u = a ^ r2 ^ r3 and parity bit p = a ^ r1 ^ r3.
  typedef struct packed {
    logic [2:0] s;   // predecessor state
    logic       u;   // information bit on the branch
    logic       p;   // parity bit on the branch
  } rsc_branch_t;

  function automatic rsc_branch_t rsc_pred(input logic [2:0] ns, input logic j);
    rsc_branch_t br;
    br.s = {ns[1], ns[0], j};
    br.u = ns[2] ^ ns[0] ^ j;
    br.p = ns[2] ^ ns[1] ^ j;
    return br;
  endfunction

  // Phases of one SISO (half-iteration) pass.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,  // waiting for start
    PH_FWD  = 2'd1,  // branch metrics stored, forward recursion
    PH_BWD  = 2'd2,  // backward recursion
    PH_LLR  = 2'd3   // LLR and extrinsic output
  } siso_phase_e;

endpackage
