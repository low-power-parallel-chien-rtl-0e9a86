// cs_ctrl: sequencer of the two-step parallel Chien search.
//
// The search runs the iteration index w from 0 to NW-1, NW = ceil(n/p). A
// start pulse while ready loads the locator coefficients into the registers
// (load). During the NW following cycles active is high: the registers are
// updated and step one of every row runs on window w. Because step two of a
// window runs one cycle after step one, the results of window w appear one
// cycle later, flagged by out_valid with out_window = w; done marks the
// results of the last window.
//
// The published design gives only the iteration range; the start/ready handshake, the
// one-cycle pipeline alignment and the done pulse are this design's choices.
// ready is high whenever step one is idle, which includes the cycle in which
// the last window's second step runs, so consecutive polynomials can follow
// each other every NW+1 cycles.
module cs_ctrl #(
  parameter int NW = 547,                  // windows per code word, ceil(n/p)
  parameter int WW = $clog2(NW + 1)        // width of the window index
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // new locator polynomial present
  output logic          ready,       // start is accepted
  output logic          load,        // load the coefficient registers
  output logic          active,      // step one runs on window w
  output logic [WW-1:0] window,      // w during active
  output logic          out_valid,   // results of window out_window present
  output logic [WW-1:0] out_window,
  output logic          done         // results of the last window present
);

  assign ready = !active;
  assign load  = start && ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active     <= 1'b0;
      window     <= '0;
      out_valid  <= 1'b0;
      out_window <= '0;
    end else begin
      out_valid  <= active;
      out_window <= window;
      if (load) begin
        active <= 1'b1;
        window <= '0;
      end else if (active) begin
        if (window == WW'(NW - 1)) active <= 1'b0;
        else                       window <= window + 1'b1;
      end
    end
  end

  assign done = out_valid && (out_window == WW'(NW - 1));

`ifndef SYNTHESIS
  a_load_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
    load |-> !active);
  a_window_range : assert property (@(posedge clk) disable iff (!rst_n)
    active |-> (window < WW'(NW)));
`endif

endmodule
