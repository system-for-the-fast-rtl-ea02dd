// chip_model - stand-in for the tested pixel chip, built into the FPGA so that
// the whole readout chain can run without the ASIC.
//
// It speaks on the same three lines as the chip: a clock and a data input from
// the transceiver, a data output back to it. The model runs on the system clock
// and detects the edges of the chip clock line; it samples din on rising edges
// and changes dout on falling edges, so the FPGA's half_period must be at least 1.
// Commands are 16 bits, MSB first: a start bit '1', a 7-bit opcode and an 8-bit
// argument (pts_pkg::chip_op_e). OPEN_GATE / CLOSE_GATE start and stop counting,
// CLEAR zeroes the count, WRITE_GREG loads the global register, READ returns one
// row of one counter. Instead of photons the model counts system clock cycles
// while the gate is open (E, 16 bits), and the value of counter k of pixel
// (row, col) is  E*(k+1) + row*COLS + col + greg  (mod 2^16), which differs
// from pixel to pixel so that the decoder's bit routing can be checked. A READ
// answer, sent while the transmitter keeps the clock running, is PIX_BITS frames,
// most significant bit plane first; each frame is a start bit '1' followed by the
// chosen bit of columns COLS-1 down to 0. Bits arriving on din while the model
// answers are ignored. The three lines, the 192 x 64 pixel geometry and the
// three counters per pixel follow the system description; the command set,
// encoding, framing and the synthetic counter values are this design's.
module chip_model
  import pts_pkg::*;
(
  input  logic clk,    // system clock
  input  logic rst_n,  // asynchronous reset, active low
  input  logic sclk,   // chip clock line
  input  logic din,    // data into the chip
  output logic dout    // data out of the chip
);

  localparam int unsigned PW = $clog2(COLS + 1);
  localparam int unsigned BW = $clog2(PIX_BITS);

  logic                  sclk_q, rise_d, fall_d;
  logic                  rx_active;
  logic [3:0]            rx_cnt;
  logic [14:0]           rx_sh, rx_word;
  chip_op_e              op;
  logic [7:0]            arg;

  logic                  gate;
  logic [PIX_BITS-1:0]   events, snap, greg;
  logic                  answering;
  logic [5:0]            rd_row;
  logic [1:0]            rd_cnt;
  logic [BW-1:0]         plane;
  logic [PW-1:0]         pos;       // 0: start bit, p: column COLS-p
  logic [PIX_BITS-1:0]   value;
  logic [PIX_BITS-1:0]   col;

  assign rise_d  = sclk && !sclk_q;
  assign fall_d  = !sclk && sclk_q;
  assign rx_word = {rx_sh[13:0], din};
  assign op      = chip_op_e'(rx_word[14:8]);
  assign arg     = rx_word[7:0];

  // Counter value of the pixel whose bit goes out next.
  always_comb begin
    col   = PIX_BITS'(COLS) - PIX_BITS'(pos);
    value = snap * PIX_BITS'(rd_cnt + 1'b1) + PIX_BITS'(rd_row) * PIX_BITS'(COLS)
          + col + greg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q    <= 1'b0;
      rx_active <= 1'b0;
      rx_cnt    <= '0;
      rx_sh     <= '0;
      gate      <= 1'b0;
      events    <= '0;
      snap      <= '0;
      greg      <= '0;
      answering <= 1'b0;
      rd_row    <= '0;
      rd_cnt    <= '0;
      plane     <= '0;
      pos       <= '0;
      dout      <= 1'b0;
    end else begin
      sclk_q <= sclk;
      if (gate) events <= events + 1'b1;

      // Command input.
      if (rise_d && !answering) begin
        if (!rx_active) begin
          rx_active <= din;
          rx_cnt    <= '0;
        end else begin
          rx_sh  <= rx_word;
          rx_cnt <= rx_cnt + 1'b1;
          if (rx_cnt == 4'd14) begin
            rx_active <= 1'b0;
            unique case (op)
              OP_OPEN_GATE:  gate   <= 1'b1;
              OP_CLOSE_GATE: gate   <= 1'b0;
              OP_CLEAR:      events <= '0;
              OP_WRITE_GREG: greg   <= PIX_BITS'(arg);
              OP_READ: begin
                answering <= 1'b1;
                snap      <= events;
                rd_row    <= arg[5:0];
                rd_cnt    <= arg[7:6];
                plane     <= BW'(PIX_BITS - 1);
                pos       <= '0;
              end
              default: ;
            endcase
          end
        end
      end

      // Answer output.
      if (fall_d) begin
        if (!answering) begin
          dout <= 1'b0;
        end else begin
          dout <= (pos == 0) ? 1'b1 : value[plane];
          if (pos == PW'(COLS)) begin
            pos <= '0;
            if (plane == 0) answering <= 1'b0;
            else            plane     <= plane - 1'b1;
          end else begin
            pos <= pos + 1'b1;
          end
        end
      end
    end
  end

endmodule
