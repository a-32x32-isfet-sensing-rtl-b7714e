`timescale 1ps / 100fs
// piso_serializer: parallel-in serial-out readout of one row of TDC results.
//
// On load, the COLS words of W bits (32 x 15 b) are taken in parallel
// together with the row number. They are then shifted out one bit per clock,
// column 0 first, most significant bit first. sdo_valid marks the bits,
// word_start the first bit of each word and row_first the first bit of the
// row; sdo_row is the row number of the words being shifted. A row takes
// COLS*W = 480 clocks, less than one row period, so one row is serialised
// while the next one is being converted. Loading while a row is still being
// shifted is a protocol error and is flagged by an assertion. Bit order,
// framing outputs and the row tag are this design's choices.
module piso_serializer #(
  parameter int unsigned COLS = isfet_pkg::COLS,
  parameter int unsigned W    = isfet_pkg::OUT_W,
  parameter int unsigned RW   = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [W-1:0]  data [COLS],
  input  logic [RW-1:0] row_in,
  output logic          sdo,
  output logic          sdo_valid,
  output logic          word_start,
  output logic          row_first,
  output logic [RW-1:0] sdo_row
);

  localparam int unsigned NBITS = COLS * W;
  localparam int unsigned NW    = $clog2(NBITS + 1);
  localparam int unsigned BW    = $clog2(W);

  logic [NBITS-1:0] shreg;
  logic [NW-1:0]    left;    // bits still to send
  logic [BW-1:0]    bitpos;  // position inside the current word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      left    <= '0;
      bitpos  <= '0;
      sdo_row <= '0;
    end else if (load) begin
      for (int c = 0; c < COLS; c++) begin
        shreg[NBITS-1-c*W -: W] <= data[c];
      end
      left    <= NW'(NBITS);
      bitpos  <= '0;
      sdo_row <= row_in;
    end else if (left != '0) begin
      shreg  <= shreg << 1;
      left   <= left - 1'b1;
      bitpos <= (bitpos == BW'(W - 1)) ? '0 : bitpos + 1'b1;
    end
  end

  assign sdo        = sdo_valid && shreg[NBITS-1];
  assign sdo_valid  = (left != '0);
  assign word_start = sdo_valid && (bitpos == '0);
  assign row_first  = (left == NW'(NBITS));

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) load |-> left == '0)
    else $error("piso_serializer: load while %0d bits were still to be sent", left);

endmodule
