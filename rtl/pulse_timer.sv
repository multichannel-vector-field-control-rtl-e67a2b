// pulse_timer: time-in-pulse index for the setpoint, gain and feedforward
// tables.
//
// A trigger pulse starts a pulse: t_addr goes to 0 and active rises. While
// active, t_addr advances by one every (div + 1) sample enables; after the
// last table entry (2^AW - 1) active falls and t_addr holds the last entry,
// so the tables' final values apply between pulses. With 65 MHz samples and
// div = 64 a 2048-entry table spans 2.05 ms in 1 us steps. The document
// names the start trigger and the tables; this stepping scheme is this
// design's choice.
module pulse_timer #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce,
  input  logic          trig,
  input  logic [7:0]    div,
  output logic [AW-1:0] t_addr,
  output logic          active
);
  logic [7:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      t_addr <= '0;
      active <= 1'b0;
    end else if (trig) begin
      cnt    <= '0;
      t_addr <= '0;
      active <= 1'b1;
    end else if (active && ce) begin
      if (cnt == div) begin
        cnt <= '0;
        if (t_addr == '1) active <= 1'b0;
        else              t_addr <= t_addr + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
