// ann_engine: the neural network that chooses the hub-router connections.
//
// Four layers: the 8x8x3 input (three traffic metrics per tile), a single
// 2x2x3 convolution kernel with stride 1 giving a 7x7 map (49 values), a
// fully connected layer of 64 neurons and a sigmoid output layer giving 64
// connection probabilities, one per tile. Output neurons 16s..16s+15 belong
// to the routers R0..R15 of subnet s; the three most probable of each group
// form that subnet's 12-bit reconfiguration instruction, the most probable
// router in bits [11:8]. Equal probabilities go to the lower router index.
// The work is spread over four lanes, one per intelligent node: lane l
// computes convolution outputs l, l+4, l+8, ... (12 products per cycle)
// and then neurons 16l..16l+15 with one multiply-accumulate per cycle.
// Arithmetic: features unsigned 8 bit, weights signed 8 bit, biases signed
// 16 bit. Convolution outputs pass a ReLU, are shifted right by CONV_SHIFT
// and saturated to 8 bits unsigned. The sigmoid is the hard sigmoid
// clamp(128 + acc/2**SIG_SHIFT, 0, 255), probability scaled to 0..255.
// Weights are trained off chip and loaded through w_we/w_addr/w_data:
//   0..11          kernel weight (dy*2+dx)*3+ch (w_data[7:0])
//   12             convolution bias
//   64..127        bias of neuron n at 64+n
//   128+49n+j      weight from convolution output j to neuron n (w_data[7:0])
// Timing: start -> done after 13 convolution cycles, 16*49 = 784 fully
// connected cycles and one selection cycle; instr holds until the next run.
// Layer sizes, the 16-neuron split per intelligent node and the top-3
// selection follow the document; number formats, ReLU, the hard sigmoid,
// the lane schedule and the address map are this design's choices.
module ann_engine
  import winoc_pkg::*;
#(
  parameter int unsigned CONV_SHIFT = 2,
  parameter int unsigned SIG_SHIFT  = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  feat [NUM_NODES][3],
  input  logic        start,
  input  logic        w_we,
  input  logic [11:0] w_addr,
  input  logic [15:0] w_data,
  output logic        busy,
  output logic        done,
  output logic [11:0] instr [NUM_SUBNETS],
  output logic [7:0]  prob  [NUM_NODES]
);

  localparam int unsigned CONV_N = 49;
  localparam int unsigned LANES  = 4;
  localparam int unsigned PER    = 16;   // neurons per lane

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_FC, S_SEL} state_e;

  logic signed [7:0]  kw   [12];
  logic signed [15:0] kb;
  logic signed [15:0] fb   [NUM_NODES];
  logic signed [7:0]  fw   [NUM_NODES][CONV_N];

  state_e             state;
  logic [7:0]         conv [CONV_N];
  logic [7:0]         in_q [NUM_NODES][3];
  logic [3:0]         pstep;      // convolution step 0..12
  logic [5:0]         j;          // fully connected input 0..48
  logic [3:0]         m;          // neuron in lane 0..15
  logic signed [23:0] acc  [LANES];
  logic signed [23:0] mac  [LANES];     // acc plus this cycle's product
  logic [11:0]        pick [NUM_SUBNETS];

  always_comb begin
    for (int l = 0; l < LANES; l++)
      mac[l] = acc[l] + 24'($signed({1'b0, conv[j]}) * fw[l * PER + int'(m)][j]);
    for (int s = 0; s < NUM_SUBNETS; s++) begin
      logic [7:0] grp [PER];
      for (int i = 0; i < PER; i++) grp[i] = prob[s * PER + i];
      pick[s] = top3(grp);
    end
  end

  // weight loading
  always_ff @(posedge clk) begin
    if (w_we) begin
      if (w_addr < 12'd12)       kw[w_addr[3:0]] <= w_data[7:0];
      else if (w_addr == 12'd12) kb <= w_data;
      else if (w_addr >= 12'd64 && w_addr < 12'd128) fb[w_addr[5:0]] <= w_data;
      else if (w_addr >= 12'd128 && w_addr < 12'd128 + 12'(NUM_NODES * CONV_N))
        fw[6'((w_addr - 12'd128) / 12'(CONV_N))][6'((w_addr - 12'd128) % 12'(CONV_N))] <= w_data[7:0];
    end
  end

  // one convolution output at position p of the 7x7 map
  function automatic logic [7:0] conv_at(int unsigned p);
    int unsigned r, c;
    logic signed [23:0] s;
    logic signed [23:0] sh;
    r = p / 7;
    c = p % 7;
    s = 24'(kb);
    for (int dy = 0; dy < 2; dy++)
      for (int dx = 0; dx < 2; dx++)
        for (int ch = 0; ch < 3; ch++)
          s += 24'($signed({1'b0, in_q[(r + dy) * 8 + c + dx][ch]}) * kw[(dy * 2 + dx) * 3 + ch]);
    if (s < 0) return 8'd0;
    sh = s >>> CONV_SHIFT;
    return (sh > 24'sd255) ? 8'd255 : sh[7:0];
  endfunction

  function automatic logic [7:0] hard_sigmoid(logic signed [23:0] a);
    logic signed [23:0] v;
    v = (a >>> SIG_SHIFT) + 24'sd128;
    if (v < 0)            return 8'd0;
    else if (v > 24'sd255) return 8'd255;
    else                  return v[7:0];
  endfunction

  // three largest of sixteen probabilities, lower index first on a tie
  function automatic logic [11:0] top3(logic [7:0] p [PER]);
    logic [PER-1:0] taken;
    logic [3:0]     sel [3];
    logic           found;
    taken = '0;
    for (int k = 0; k < 3; k++) begin
      sel[k] = '0;
      found   = 1'b0;
      for (int i = 0; i < PER; i++)
        if (!taken[i] && (!found || p[i] > p[sel[k]])) begin
          sel[k] = 4'(i);
          found   = 1'b1;
        end
      taken[sel[k]] = 1'b1;
    end
    return {sel[0], sel[1], sel[2]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      pstep <= '0;
      j     <= '0;
      m     <= '0;
      for (int l = 0; l < LANES; l++) acc[l] <= '0;
      for (int s = 0; s < NUM_SUBNETS; s++) instr[s] <= '0;
      for (int n = 0; n < NUM_NODES; n++) begin
        prob[n] <= '0;
        for (int c = 0; c < 3; c++) in_q[n][c] <= '0;
      end
      for (int p = 0; p < CONV_N; p++) conv[p] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          in_q  <= feat;
          pstep <= '0;
          state <= S_CONV;
        end
        S_CONV: begin
          for (int l = 0; l < LANES; l++)
            if (int'(pstep) * LANES + l < CONV_N)
              conv[int'(pstep) * LANES + l] <= conv_at(int'(pstep) * LANES + l);
          pstep <= pstep + 1'b1;
          if (pstep == 4'd12) begin
            state <= S_FC;
            j     <= '0;
            m     <= '0;
            for (int l = 0; l < LANES; l++) acc[l] <= 24'(fb[l * PER]);
          end
        end
        S_FC: begin
          for (int l = 0; l < LANES; l++) begin
            if (j == 6'(CONV_N - 1)) begin
              prob[l * PER + int'(m)] <= hard_sigmoid(mac[l]);
              if (m != 4'(PER - 1)) acc[l] <= 24'(fb[l * PER + int'(m) + 1]);
            end else begin
              acc[l] <= mac[l];
            end
          end
          if (j == 6'(CONV_N - 1)) begin
            j <= '0;
            m <= m + 1'b1;
            if (m == 4'(PER - 1)) state <= S_SEL;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_SEL: begin
          instr <= pick;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
