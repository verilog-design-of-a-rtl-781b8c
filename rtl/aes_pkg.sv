// aes_pkg: types and constants shared by the AES-256/AES-128 crypto core.
// The key-length selector follows the convention spec=0 for AES256 and
// spec=1 for AES128. The two control-vector structs are this design's own
// encoding of the signals the control unit sends to the key expander and to
// the round transformer.
package aes_pkg;

  typedef enum logic {AES256 = 1'b0, AES128 = 1'b1} aes_spec_e;
  typedef enum logic {ENCRYPT = 1'b0, DECRYPT = 1'b1} aes_mode_e;

  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0] key_t;

  // Control vector to the key expander.
  typedef struct packed {
    logic      load;  // latch the cipher key
    logic      en;    // produce key word idx this cycle
    logic [5:0] idx;  // key word index i, 0 .. 4*(Nr+1)-1
    aes_spec_e spec;  // key length
  } ke_ctrl_t;

  // Control vector to the round transformer.
  typedef struct packed {
    logic      load;   // state <= data_in ^ round_key
    logic      round;  // apply one round
    logic      last;   // the round is the final one (no MixColumn)
    aes_mode_e mode;   // encrypt or decrypt
  } tr_ctrl_t;

  function automatic logic [3:0] num_rounds(aes_spec_e spec);
    return (spec == AES256) ? 4'd14 : 4'd10;
  endfunction

  function automatic logic [3:0] num_key_words(aes_spec_e spec);
    return (spec == AES256) ? 4'd8 : 4'd4;
  endfunction

endpackage
