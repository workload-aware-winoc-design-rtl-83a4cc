// reconfig_trigger: reconfiguration activation in the intelligent nodes.
//
// Every router reports a dropped packet (one whose ABP req got no ack
// within the timeout) with a one-cycle pulse on drop. The intelligent node
// of each subnet counts the drops of its sixteen routers, several per cycle
// if need be, saturating at CNT_MAX. When the counters of all four subnets
// have reached THRESHOLD, start pulses for one cycle and all counters
// clear. While the network computes a new configuration (hold = 1) the
// counters keep counting but no new start is issued.
// THRESHOLD = 3 dropped packets is the value the document found best; the
// counter width, "reached" (>=) as the meaning of "exceeds the threshold"
// and the hold input are this design's choices.
module reconfig_trigger
  import winoc_pkg::*;
#(
  parameter int unsigned THRESHOLD = 3,
  parameter int unsigned CNT_W     = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_NODES-1:0]  drop,
  input  logic                  hold,
  output logic                  start,
  output logic [CNT_W-1:0]      count [NUM_SUBNETS]
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [NUM_SUBNETS-1:0] reached;
  logic [4:0]             inc [NUM_SUBNETS];

  always_comb begin
    for (int s = 0; s < NUM_SUBNETS; s++) begin
      inc[s] = '0;
      for (int n = 0; n < NUM_NODES; n++)
        if (subnet_of(6'(n)) == 2'(s)) inc[s] += {4'd0, drop[n]};
      reached[s] = (count[s] >= CNT_W'(THRESHOLD));
    end
    start = (&reached) && !hold;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SUBNETS; s++) count[s] <= '0;
    end else begin
      for (int s = 0; s < NUM_SUBNETS; s++) begin
        if (start)
          count[s] <= CNT_W'(inc[s]);
        else if ({1'b0, count[s]} + (CNT_W+1)'(inc[s]) > (CNT_W+1)'(CNT_MAX))
          count[s] <= CNT_MAX;
        else
          count[s] <= count[s] + CNT_W'(inc[s]);
      end
    end
  end

endmodule
