// kasumi_pkg - types and constants shared by the KASUMI core.
//
// KASUMI works on 16-bit key words. The 128-bit key K is handled as eight
// words K1..K8 with K1 in bits 127:112. K' is K xor the fixed constant string
// C1..C8 = 0123 4567 89AB CDEF FEDC BA98 7654 3210 (KASUMI specification).
// A round-key set holds KL (2 words), KO (3 words) and KI (3 words); the core
// always works on two sets at a time, one for the odd and one for the even
// round of a round pair.
package kasumi_pkg;

  typedef logic [15:0] word_t;

  // Subkeys of one FO function, named as in the KASUMI specification.
  typedef struct packed {
    word_t ko1;
    word_t ko2;
    word_t ko3;
    word_t ki1;
    word_t ki2;
    word_t ki3;
  } fo_keys_t;

  // One round's subkeys: KL for FL, KO and KI for FO.
  typedef struct packed {
    word_t    kl1;
    word_t    kl2;
    fo_keys_t fo;
  } round_keys_t;

  // Constants C1..C8 of the key schedule, C1 in the top word.
  localparam logic [127:0] KEY_CONST = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;

  // Controller states: an idle state plus the twelve processing states
  // (four round pairs of three steps each).
  typedef enum logic [3:0] {
    ST_S0, ST_S1, ST_S2, ST_S3, ST_S4, ST_S5,
    ST_S6, ST_S7, ST_S8, ST_S9, ST_S10, ST_S11,
    ST_IDLE
  } ctrl_state_t;

  // Rotate a 16-bit word left by n bits (0 < n < 16).
  function automatic word_t rol16(input word_t w, input int unsigned n);
    return (w << n) | (w >> (16 - n));
  endfunction

endpackage
