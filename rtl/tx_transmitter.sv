// tx_transmitter - serializer of variable-length commands for the tested chip.
//
// A command {len, data} is accepted with a valid/ready handshake when the
// transmitter is idle. It then enables the clock generator and puts one bit on
// dout per chip clock period: bits data[len-1] down to data[0] when len <= 32;
// otherwise data[31] down to data[0] followed by len-32 zero bits, which keep the
// clock running while the chip answers (a readout). dout changes on the `fall`
// strobe, so it is stable at every rising edge of sclk; the clock is switched off
// after the falling edge that ends the last bit, so exactly len rising edges are
// produced per command and none outside a command. A command with len = 0 is
// accepted and ignored. Variable-length payloads and clock gating follow the
// system description; the bit order and the zero padding are this design's.
module tx_transmitter
  import pts_pkg::*;
(
  input  logic    clk,        // system clock
  input  logic    rst_n,      // asynchronous reset, active low
  input  logic    cmd_valid,  // command offered
  input  tx_cmd_t cmd,        // command to send
  output logic    cmd_ready,  // idle: command accepted this cycle if valid
  input  logic    fall,       // falling-edge strobe from the clock generator
  output logic    clk_en,     // run the clock generator
  output logic    dout,       // serial data to the chip
  output logic    busy        // a command is being sent
);

  logic [CMD_DW-1:0] shreg;
  logic [CMD_LW-1:0] remaining;

  assign cmd_ready = !busy;
  assign clk_en    = busy;
  assign dout      = busy && shreg[CMD_DW-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      shreg     <= '0;
      remaining <= '0;
    end else if (!busy) begin
      if (cmd_valid && cmd.len != 0) begin
        busy      <= 1'b1;
        remaining <= cmd.len;
        if (cmd.len < CMD_LW'(CMD_DW))
          shreg <= cmd.data << (CMD_LW'(CMD_DW) - cmd.len);
        else
          shreg <= cmd.data;
      end
    end else if (fall) begin
      shreg     <= shreg << 1;
      remaining <= remaining - 1'b1;
      if (remaining == 1) busy <= 1'b0;
    end
  end

endmodule
