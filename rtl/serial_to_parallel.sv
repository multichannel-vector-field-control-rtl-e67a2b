// serial_to_parallel: deserializer for one 8-channel, 12-bit ADC.
//
// Each ADC sends every channel on its own LVDS lane at 6x the sample rate
// with two bits per bit-clock period (double data rate), so a 12-bit word
// takes 6 bit-clock cycles. The DDR input registers of the I/O cells are
// assumed to deliver, per lane, the bit of the rising edge (rise) and the bit
// of the falling edge (fall) in the same cycle. This block shifts two bits per
// cycle into each lane's register, most significant bit first, rise before
// fall. The frame input marks the cycle carrying the first bit pair of a word
// (as an ADC frame clock does); six cycles later the eight words are
// complete, are copied to the word output and valid pulses for one cycle.
// The 6x/DDR ratio and the 12-bit width follow the document; the bit order and
// the frame marker are this design's assumptions.
module serial_to_parallel #(
  parameter int unsigned LANES = 8,
  parameter int unsigned BITS  = 12,
  parameter int unsigned RATIO = 6    // bit-clock cycles per word (BITS / 2)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       frame,
  input  logic [LANES-1:0]           rise,
  input  logic [LANES-1:0]           fall,
  output logic [LANES-1:0][BITS-1:0] word,
  output logic                       valid
);
  localparam int unsigned CW = $clog2(RATIO);

  logic [LANES-1:0][BITS-1:0] shreg;
  logic [CW-1:0]              cnt;     // bit pair being received
  logic                       locked;  // a frame marker has been seen

  // next content of the shift registers, including this cycle's bit pair
  logic [LANES-1:0][BITS-1:0] shnext;
  always_comb
    for (int l = 0; l < LANES; l++)
      shnext[l] = {shreg[l][BITS-3:0], rise[l], fall[l]};

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      cnt    <= '0;
      locked <= 1'b0;
      shreg  <= '0;
      word   <= '0;
    end else begin
      shreg <= shnext;
      if (frame) begin
        cnt    <= CW'(1);
        locked <= 1'b1;
      end else if (cnt == CW'(RATIO - 1)) begin
        cnt <= '0;
        if (locked) begin
          word  <= shnext;
          valid <= 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (BITS == 2 * RATIO) else $error("BITS must be 2*RATIO (DDR)");
endmodule
