// tx_line_switch - routes the three transceiver lines to the real chip or to
// the chip model inside the FPGA.
//
// sel = 0 selects the ASIC, sel = 1 the model; sel comes from a CSR. The clock
// and data of the port that is not selected are held low, so that port sees no
// clock edges, and only the selected port's data line reaches the receiver.
// Purely combinational. The switch and its CSR control follow the system
// description; holding the unused port low is this design's choice.
module tx_line_switch (
  input  logic sel,         // 0: ASIC, 1: chip model
  input  logic sclk,        // chip clock from the transceiver
  input  logic dout,        // data from the transmitter
  output logic din,         // data to the receiver
  output logic asic_clk,    // ASIC clock line
  output logic asic_din,    // ASIC data input
  input  logic asic_dout,   // ASIC data output
  output logic model_clk,   // model clock line
  output logic model_din,   // model data input
  input  logic model_dout   // model data output
);

  always_comb begin
    asic_clk  = !sel && sclk;
    asic_din  = !sel && dout;
    model_clk =  sel && sclk;
    model_din =  sel && dout;
    din       =  sel ? model_dout : asic_dout;
  end

endmodule
