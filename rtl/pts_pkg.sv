// pts_pkg - types and constants shared by the pixel-chip test system.
//
// The geometry of the tested chip (192 columns x 64 rows, three counters per
// pixel) and the 192-bit receiver / 192 x 16-bit pixel word widths come from the
// system description. The command word, the sequencer entry layout and the
// chip-model opcodes are this design's own choices; they are collected here so
// that the RTL, the testbenches and host software agree on one encoding.
package pts_pkg;

  // Tested chip geometry.
  localparam int unsigned COLS     = 192;  // pixel columns = receiver word width
  localparam int unsigned ROWS     = 64;   // pixel rows
  localparam int unsigned COUNTERS = 3;    // counters (discriminators) per pixel
  localparam int unsigned PIX_BITS = 16;   // bits per pixel after decoding

  // Transmitter command: up to 32 payload bits, followed by zero bits when
  // len exceeds 32 (those keep the chip clock running during a readout).
  localparam int unsigned CMD_DW  = 32;
  localparam int unsigned CMD_LW  = 16;
  typedef struct packed {
    logic [CMD_LW-1:0] len;   // number of bits (= chip clock cycles) to send
    logic [CMD_DW-1:0] data;  // payload, bit len-1 (or bit 31) sent first
  } tx_cmd_t;

  // Sequencer RAM entry (64 bits).
  typedef enum logic [0:0] {
    SEQ_CMD   = 1'b0,  // forward {len, data} to the transmitter
    SEQ_DELAY = 1'b1   // idle for data[31:0] system clock cycles
  } seq_kind_e;

  typedef struct packed {
    logic              last;  // final entry of the sequence
    seq_kind_e         kind;
    logic [13:0]       rsvd;
    logic [CMD_LW-1:0] len;
    logic [CMD_DW-1:0] data;
  } seq_entry_t;

  localparam int unsigned SEQ_DW = $bits(seq_entry_t);

  // Decoded pixel word: 192 pixels of 16 bits, pixel c in bits [c*16 +: 16].
  typedef logic [COLS-1:0][PIX_BITS-1:0] pix_word_t;
  localparam int unsigned PIX_WORD_W = COLS * PIX_BITS;

  // Chip-model serial protocol: start bit '1', 7-bit opcode, 8-bit argument,
  // most significant bit first.
  localparam int unsigned CHIP_CMD_BITS = 16;
  typedef enum logic [6:0] {
    OP_NOP        = 7'd0,
    OP_OPEN_GATE  = 7'd1,  // start counting
    OP_CLOSE_GATE = 7'd2,  // stop counting
    OP_READ       = 7'd3,  // arg = {counter[1:0], row[5:0]}: read one row
    OP_WRITE_GREG = 7'd4,  // arg -> global register
    OP_CLEAR      = 7'd5   // clear the counters
  } chip_op_e;

  // Bits a READ command must carry so that the clock runs for the whole
  // answer: the command itself, then PIX_BITS frames of a start bit and COLS
  // data bits.
  localparam int unsigned READ_LEN = CHIP_CMD_BITS + PIX_BITS * (COLS + 1);

  function automatic logic [CMD_DW-1:0] chip_cmd(chip_op_e op, logic [7:0] arg);
    return {16'h0, 1'b1, op, arg};
  endfunction

endpackage
