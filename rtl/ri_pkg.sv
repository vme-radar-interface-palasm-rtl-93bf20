// Shared types and helpers for the VME radar interface.
//
// The packing mode P[2..0] is common to the four packer slices and the
// input clock generator: it selects how many bits of each input sample are
// kept (16 with sign extension, 8, 4, 2 or 1) and therefore how many samples
// fill one 16-bit word (1, 2, 4, 8 or 16).  The three codes not listed are
// unused: the packer clears its word in them.
package ri_pkg;

  typedef enum logic [2:0] {
    PACK16 = 3'b000,  // 16 bits, sign extended sample
    PACK8  = 3'b001,
    PACK4  = 3'b010,
    PACK2  = 3'b011,
    PACK1  = 3'b111
  } pack_mode_e;

  // Samples per packed 16-bit word in a given mode (0 for an unused code).
  function automatic int unsigned samples_per_word(logic [2:0] p);
    case (p)
      PACK16:  return 1;
      PACK8:   return 2;
      PACK4:   return 4;
      PACK2:   return 8;
      PACK1:   return 16;
      default: return 0;
    endcase
  endfunction

  // Command byte fields decoded by the command word latch (UD[6..0]).
  typedef enum logic [1:0] {
    XFER_NOP    = 2'b00,
    XFER_WORDX  = 2'b01,  // single word transfer
    XFER_MOVEM  = 2'b10,  // block (movem) transfer
    XFER_OFF    = 2'b11   // disable transfers
  } xfer_cmd_e;

  typedef enum logic [1:0] {
    CHSEL_NOP = 2'b00,
    CHSEL_CH1 = 2'b01,
    CHSEL_CH2 = 2'b10,
    CHSEL_ALT = 2'b11     // alternate between the channels
  } chsel_cmd_e;

  typedef enum logic [1:0] {
    TEST_NOP  = 2'b00,
    TEST_OFF  = 2'b01,
    TEST_ON   = 2'b10,
    TEST_NOP2 = 2'b11
  } test_cmd_e;

endpackage
