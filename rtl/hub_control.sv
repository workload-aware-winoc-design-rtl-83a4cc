// hub_control: control module of a reconfigurable wireless hub.
//
// A reconfiguration instruction names three routers of the subnet as three
// 4-bit indices, the one most likely to need wireless access in bits
// [11:8], the next in [7:4], the last in [3:0]. The allocator maps them onto
// the three MUX slots of the hub so that as few slots as possible change:
// a router that is already connected keeps its slot, and the new routers
// take the slots whose present router was not named again (in slot order).
// Each changed slot waits in OUT_i_new until its Available_i input says no
// packet is half-way through that slot's buffers; then the slot's MUX
// select switches to OUT_i_new in that same cycle and OUT_i is updated.
// Each slot carries the priority rank (0 highest) of its router in the
// instruction; the switch arbiters use it. A kept slot takes its new rank at
// once, a relinked slot when it relinks.
// Interface: cfg_valid/cfg_instr is a one-cycle command; mux_sel is the
// select of the three 16:1 MUXes; relink pulses when a slot changes router;
// busy is high while any slot waits. The allocator, Available_i and the
// priority order follow the document; the reset connection (R5, R6, R9,
// the tiles (1,1), (2,1), (1,2) of a subnet) and the tie handling are this
// design's choices.
module hub_control
  import winoc_pkg::*;
#(
  parameter rtr_id_t RESET_SEL0 = 4'd5,
  parameter rtr_id_t RESET_SEL1 = 4'd6,
  parameter rtr_id_t RESET_SEL2 = 4'd9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_valid,
  input  logic [11:0]         cfg_instr,
  input  logic [NUM_WI-1:0]   avail,
  output rtr_id_t             mux_sel  [NUM_WI],
  output logic [1:0]          prio     [NUM_WI],
  output logic [NUM_WI-1:0]   relink,
  output logic                busy
);

  rtr_id_t             out_q     [NUM_WI];
  rtr_id_t             new_q     [NUM_WI];
  logic [1:0]          new_prio_q[NUM_WI];
  logic [1:0]          prio_q    [NUM_WI];
  logic [NUM_WI-1:0]   pend_q;

  rtr_id_t             req       [NUM_WI];
  rtr_id_t             alloc     [NUM_WI];
  logic [1:0]          alloc_prio[NUM_WI];
  logic [NUM_WI-1:0]   keep, placed, used;

  assign req[0] = cfg_instr[11:8];
  assign req[1] = cfg_instr[7:4];
  assign req[2] = cfg_instr[3:0];

  // Allocator: keep slots whose router is named again, fill the others.
  always_comb begin
    logic done;
    for (int i = 0; i < NUM_WI; i++) begin
      keep[i]   = (out_q[i] == req[0]) || (out_q[i] == req[1]) || (out_q[i] == req[2]);
      placed[i] = (req[i] == out_q[0]) || (req[i] == out_q[1]) || (req[i] == out_q[2]);
      alloc[i]  = out_q[i];
    end
    used = keep;
    for (int j = 0; j < NUM_WI; j++) begin
      done = 1'b0;
      if (!placed[j]) begin
        for (int i = 0; i < NUM_WI; i++) begin
          if (!done && !used[i]) begin
            alloc[i] = req[j];
            used[i]  = 1'b1;
            done     = 1'b1;
          end
        end
      end
    end
    for (int i = 0; i < NUM_WI; i++) begin
      alloc_prio[i] = 2'd2;
      for (int j = NUM_WI - 1; j >= 0; j--)
        if (alloc[i] == req[j]) alloc_prio[i] = 2'(j);
    end
  end

  // MUX select: OUT_i_new as soon as Available_i allows, else OUT_i.
  always_comb begin
    for (int i = 0; i < NUM_WI; i++) begin
      relink[i]  = pend_q[i] && avail[i] && !cfg_valid;
      mux_sel[i] = relink[i] ? new_q[i] : out_q[i];
      prio[i]    = relink[i] ? new_prio_q[i] : prio_q[i];
    end
  end

  assign busy = |pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q[0] <= RESET_SEL0;
      out_q[1] <= RESET_SEL1;
      out_q[2] <= RESET_SEL2;
      for (int i = 0; i < NUM_WI; i++) begin
        prio_q[i]     <= 2'(i);
        new_prio_q[i] <= 2'(i);
      end
      new_q[0] <= RESET_SEL0;
      new_q[1] <= RESET_SEL1;
      new_q[2] <= RESET_SEL2;
      pend_q   <= '0;
    end else if (cfg_valid) begin
      for (int i = 0; i < NUM_WI; i++) begin
        new_q[i]      <= alloc[i];
        new_prio_q[i] <= alloc_prio[i];
        pend_q[i]     <= (alloc[i] != out_q[i]);
        if (alloc[i] == out_q[i]) prio_q[i] <= alloc_prio[i];
      end
    end else begin
      for (int i = 0; i < NUM_WI; i++) begin
        if (relink[i]) begin
          out_q[i]  <= new_q[i];
          prio_q[i] <= new_prio_q[i];
          pend_q[i] <= 1'b0;
        end
      end
    end
  end

  // The three routers of an instruction must be different.
  a_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_valid |-> (req[0] != req[1]) && (req[0] != req[2]) && (req[1] != req[2]));

endmodule
