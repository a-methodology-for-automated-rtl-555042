// ced_pkg: shared types, constants and state-encoding functions for the
// concurrent error detection (CED) designs.
//
// An FSM protected by CED keeps its logical states but stores them in one of
// three codes:
//   ENC_BINARY : the original 2-bit code (state i -> i), used unprotected and by
//                the duplication scheme.
//   ENC_PARITY : the original code with an odd-parity bit prepended as MSB
//                (2'b00 -> 3'b100, 2'b01 -> 3'b001, 2'b10 -> 3'b010,
//                2'b11 -> 3'b111). The parity bit is chosen so that every
//                legal code word holds an odd number of ones.
//   ENC_ONEHOT : state i -> the word with only bit i set (2'b10 -> 4'b0100).
// The encoding functions are evaluated at elaboration time on constants, so the
// state constants of an FSM written with enc_state() become the re-encoded
// literals; synthesis then derives the parity bit (or the one-hot bits) from the
// same next-state case statement, exactly as if the literals had been edited by
// hand. The parity bit position, its odd sense and the one-hot bit order follow
// the document's example; the two-rail convention (01/10 valid, 00/11 error) is
// the usual one for self-checking checkers.
package ced_pkg;

  // Logical states of the example FSM (original 2-bit code of the example).
  localparam int unsigned NSTATES = 4;
  localparam int unsigned SBITS   = 2;   // width of the original state code
  localparam int unsigned NOUT    = 4;   // number of FSM outputs

  typedef enum logic [1:0] {
    S0 = 2'b00,
    S1 = 2'b01,
    S2 = 2'b10,
    S3 = 2'b11
  } state_e;

  typedef enum logic [1:0] {
    ENC_BINARY = 2'd0,
    ENC_PARITY = 2'd1,
    ENC_ONEHOT = 2'd2
  } enc_e;

  // Bit positions of the FSM output vector.
  localparam int unsigned O_DONE = 0;
  localparam int unsigned O_BUSY = 1;
  localparam int unsigned O_LD   = 2;
  localparam int unsigned O_SIGX = 3;

  // Widest state register any encoding needs (one-hot of NSTATES states).
  localparam int unsigned WMAX = NSTATES;

  // Width of the state register under a given encoding.
  function automatic int unsigned state_w(enc_e enc);
    case (enc)
      ENC_PARITY: return SBITS + 1;
      ENC_ONEHOT: return NSTATES;
      default:    return SBITS;
    endcase
  endfunction

  // Code word of logical state s under encoding enc, right-aligned in WMAX bits.
  function automatic logic [WMAX-1:0] enc_state(enc_e enc, state_e s);
    logic [WMAX-1:0] w;
    w = '0;
    case (enc)
      ENC_PARITY: begin
        w[SBITS-1:0] = s;
        w[SBITS]     = ~(^s);      // odd parity over the SBITS+1 bits
      end
      ENC_ONEHOT: w[s] = 1'b1;
      default:    w[SBITS-1:0] = s;
    endcase
    return w;
  endfunction

  // A two-rail pair: valid (no error) when the rails differ.
  typedef logic [1:0] tworail_t;

  function automatic logic tr_valid(tworail_t t);
    return t[0] ^ t[1];
  endfunction

endpackage
