// acq_ctrl: acquisition controller of the diagnostic buffers.
//
// A trigger pulse (re)starts an acquisition: from the next sample on, every
// (div + 1)-th sample enable produces a one-cycle wr_en with the next buffer
// address, starting at 0. After the last address (2^AW - 1) the acquisition
// stops, busy falls and done rises until the next trigger. With the 65 MHz
// sample rate and div = 64 the buffers fill at 1 MSample/s, the acquisition
// rate the document gives; single-shot filling on a trigger is this design's
// choice.
module acq_ctrl #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce,
  input  logic          trig,
  input  logic [7:0]    div,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic          busy,
  output logic          done
);
  logic [7:0]    cnt;
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    wr_en <= 1'b0;
    if (rst) begin
      cnt     <= '0;
      addr    <= '0;
      wr_addr <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else if (trig) begin
      cnt  <= '0;
      addr <= '0;
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy && ce) begin
      if (cnt == 8'd0) begin
        wr_en   <= 1'b1;
        wr_addr <= addr;
        addr    <= addr + 1'b1;
        if (addr == '1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      cnt <= (cnt == div) ? 8'd0 : cnt + 1'b1;
    end
  end
endmodule
