// tx_receiver - deserializer of the data the tested chip sends back.
//
// A 192-bit shift register samples din at every rising edge of the generated
// chip clock (the `rise` strobe). While idle the receiver waits for a start bit
// ('1'); it then counts the following WIDTH bits, and when the count is complete
// it copies the word to its output register and raises out_valid (an Avalon-ST
// source). The first bit received ends up in bit WIDTH-1. The chip cannot be
// stalled, so if a new word completes while the previous one has not been taken,
// the new word is dropped and the sticky `overrun` flag is set (cleared by
// overrun_clr). word_count counts the words delivered. The 192-bit shift register
// sampled on rising edges, the bit counting and the valid signal follow the system
// description; the start bit, the overrun flag and the word counter are this
// design's.
module tx_receiver #(
  parameter int unsigned WIDTH = 192  // bits per received word
) (
  input  logic             clk,          // system clock
  input  logic             rst_n,        // asynchronous reset, active low
  input  logic             rise,         // rising-edge strobe of the chip clock
  input  logic             din,          // serial data from the chip
  output logic             out_valid,    // Avalon-ST: word available
  input  logic             out_ready,    // Avalon-ST: sink takes the word
  output logic [WIDTH-1:0] out_data,     // Avalon-ST: received word
  output logic             overrun,      // sticky: a word was lost
  input  logic             overrun_clr,  // clear `overrun`
  output logic [31:0]      word_count    // number of words received
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic             active;
  logic [CW-1:0]    nbits;
  logic [WIDTH-1:0] shreg;
  logic [WIDTH-1:0] shreg_next;
  logic             word_done;

  assign shreg_next = {shreg[WIDTH-2:0], din};
  assign word_done  = rise && active && (nbits == CW'(WIDTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      nbits      <= '0;
      shreg      <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      overrun    <= 1'b0;
      word_count <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (overrun_clr) overrun <= 1'b0;
      if (rise) begin
        if (!active) begin
          active <= din;
          nbits  <= '0;
        end else begin
          shreg <= shreg_next;
          nbits <= nbits + 1'b1;
          if (word_done) active <= 1'b0;
        end
      end
      if (word_done) begin
        if (out_valid && !out_ready) begin
          overrun <= 1'b1;
        end else begin
          out_valid  <= 1'b1;
          out_data   <= shreg_next;
          word_count <= word_count + 1'b1;
        end
      end
    end
  end

endmodule
