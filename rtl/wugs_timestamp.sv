// wugs_timestamp: cell time stamping with transitional stamps.
//
// A free-running counter counts time in half cell times (one cell time is
// one clock, so it advances by 2 per clock). Normally a cell entering the
// switch is stamped with the current time. After a routing change at time
// tau the stamps are inflated so that cells sent on the new route cannot
// overtake cells still in the network on the old route: in half steps,
//     stamp = 2*tau + 2*T + (now - 2*tau)/1  ... i.e. the stamp advances by
// one half step per cell time, starting at tau+T.
// The inflation therefore starts at T cell times and shrinks by half a cell
// time per cell time, reaching zero 2T cell times after the change; cells
// arriving in the first T cell times get stamps in [tau+T, tau+1.5T) and
// the half-step resolution keeps consecutive stamps distinct.
//
// Interface: change pulses when a route changes, t_param is T in cell
// times (the transitional time stamping parameter), enable turns the
// mechanism on. now is the current time, stamp the stamp for a cell that
// enters in this cycle, transitional is high while stamps are inflated.
//
// Inflation by T that falls to zero and half-step precision follow the
// document; the exact slope (zero after 2T) is this design's reading.
module wugs_timestamp
  import wugs_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            change,
  input  logic            enable,
  input  logic [11:0]     t_param,
  output logic [TS_W-1:0] now,
  output logic [TS_W-1:0] stamp,
  output logic            transitional
);
  logic [TS_W-1:0] tau;       // time of the last change (half steps)
  logic            active;
  logic [TS_W-1:0] elapsed;   // now - tau, half steps
  logic [TS_W-1:0] t_half;    // T in half steps

  assign t_half  = TS_W'({t_param, 1'b0});
  assign elapsed = now - tau;
  assign transitional = active && (elapsed < (t_half << 1));
  assign stamp = transitional ? (tau + t_half + (elapsed >> 1)) : now;

  always_ff @(posedge clk) begin
    if (rst) begin
      now    <= '0;
      tau    <= '0;
      active <= 1'b0;
    end else begin
      now <= now + TS_W'(2);
      if (change && enable && t_param != '0) begin
        tau    <= now;
        active <= 1'b1;
      end else if (active && !transitional) begin
        active <= 1'b0;
      end
    end
  end
endmodule
