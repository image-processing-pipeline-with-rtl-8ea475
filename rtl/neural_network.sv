// neural_network: fully connected 784-10-10-10 digit classifier.
//
// The input is the 28x28 4-bit compressed image, read one pixel per cycle from
// the image store through pix_addr/pix_data (combinational read). Each layer
// runs three states of one finite state machine:
//   multiply: one input per cycle times its ten weights, ten multiply-
//             accumulates in parallel (784 cycles for the first layer, 10 for
//             the others); a pixel is zero-extended to a signed 5-bit value;
//   bias:     one bias added per cycle (10 cycles);
//   ReLU:     one output clamped at zero per cycle (10 cycles), hidden layers
//             only; the output layer is linear.
// After the output layer one more cycle ranks the ten outputs and reports the
// three largest (ties go to the lower digit). From `start` to the `done` pulse
// takes 784 + 10*7 + 2 = 856 cycles.
//
// Parameters are 16-bit signed integers in distributed memories loaded through
// the wt_* port: wt_sel 0..2 selects weight matrix 1..3 (wt_row = input index,
// wt_col = neuron), 3..5 bias vector 1..3 (wt_col = neuron). The accumulators
// are ACC_W bits wide so that no layer can overflow with 16-bit parameters:
// a layer-1 sum is below 784*15*2^15 < 2^29, and each later layer of ten
// products with 16-bit weights adds at most 15+4 bits, so below 2^67 + bias
// at the output (sign included, 72 bits suffice).
//
// The layer sizes, the state sequence, ten parallel MACs and the 16-bit
// parameter format follow the design description; the load port, the ranking
// cycle and the accumulator width are this design's choices.
module neural_network #(
  parameter int unsigned N_IN  = 784,
  parameter int unsigned N_N   = 10,
  parameter int unsigned WW    = 16,
  parameter int unsigned ACC_W = 72
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // input image read port
  output logic [$clog2(N_IN)-1:0]      pix_addr,
  input  logic [3:0]                   pix_data,
  // parameter load port
  input  logic                         wt_we,
  input  logic [2:0]                   wt_sel,
  input  logic [$clog2(N_IN)-1:0]      wt_row,
  input  logic [$clog2(N_N)-1:0]       wt_col,
  input  logic signed [WW-1:0]         wt_data,
  // results
  output logic signed [ACC_W-1:0]      scores [N_N],
  output logic [3:0]                   top [3]
);
  localparam int unsigned IW = $clog2(N_IN);
  localparam int unsigned NW = $clog2(N_N);

  typedef enum logic [2:0] {N_IDLE, N_MUL, N_BIAS, N_RELU, N_RANK} state_t;
  state_t state;
  logic [1:0]    layer;
  logic [IW-1:0] i;

  logic signed [WW-1:0] w1 [N_IN][N_N];
  logic signed [WW-1:0] w2 [N_N][N_N];
  logic signed [WW-1:0] w3 [N_N][N_N];
  logic signed [WW-1:0] bias [3][N_N];

  logic signed [ACC_W-1:0] acc [N_N];   // current layer
  logic signed [ACC_W-1:0] h   [N_N];   // previous layer's activations

  // Parameter load
  always_ff @(posedge clk) begin
    if (wt_we) begin
      unique case (wt_sel)
        3'd0: w1[wt_row][wt_col] <= wt_data;
        3'd1: w2[NW'(wt_row)][wt_col] <= wt_data;
        3'd2: w3[NW'(wt_row)][wt_col] <= wt_data;
        3'd3: bias[0][wt_col] <= wt_data;
        3'd4: bias[1][wt_col] <= wt_data;
        3'd5: bias[2][wt_col] <= wt_data;
        default: ;
      endcase
    end
  end

  // Multiplier operand and weight row of this cycle
  logic signed [ACC_W-1:0] a;
  logic signed [WW-1:0]    wrow [N_N];
  always_comb begin
    a = (layer == 2'd0) ? ACC_W'($signed({1'b0, pix_data})) : h[NW'(i)];
    for (int n = 0; n < N_N; n++)
      unique case (layer)
        2'd0:    wrow[n] = w1[i][n];
        2'd1:    wrow[n] = w2[NW'(i)][n];
        default: wrow[n] = w3[NW'(i)][n];
      endcase
  end
  assign pix_addr = i;

  // Ranking of the output layer: three passes of an arg-max
  logic [3:0] rank [3];
  always_comb begin
    logic [N_N-1:0] taken;
    taken = '0;
    for (int k = 0; k < 3; k++) begin
      logic found;
      found   = 1'b0;
      rank[k] = '0;
      for (int n = 0; n < N_N; n++)
        if (!taken[n] && (!found || acc[n] > acc[rank[k]])) begin
          rank[k] = 4'(n);
          found   = 1'b1;
        end
      taken[rank[k]] = 1'b1;
    end
  end

  logic [IW-1:0] mul_last;
  assign mul_last = (layer == 2'd0) ? IW'(N_IN - 1) : IW'(N_N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= N_IDLE;
      layer <= '0;
      i     <= '0;
      done  <= 1'b0;
      for (int n = 0; n < N_N; n++) begin
        acc[n]    <= '0;
        h[n]      <= '0;
        scores[n] <= '0;
      end
      for (int k = 0; k < 3; k++) top[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        N_IDLE: if (start) begin
          layer <= '0;
          i     <= '0;
          for (int n = 0; n < N_N; n++) acc[n] <= '0;
          state <= N_MUL;
        end
        N_MUL: begin
          for (int n = 0; n < N_N; n++)
            acc[n] <= acc[n] + a * ACC_W'(wrow[n]);
          if (i == mul_last) begin
            i     <= '0;
            state <= N_BIAS;
          end else begin
            i <= i + 1'b1;
          end
        end
        N_BIAS: begin
          acc[NW'(i)] <= acc[NW'(i)] + ACC_W'(bias[layer][NW'(i)]);
          if (i == IW'(N_N - 1)) begin
            i     <= '0;
            state <= (layer == 2'd2) ? N_RANK : N_RELU;
          end else begin
            i <= i + 1'b1;
          end
        end
        N_RELU: begin
          if (acc[NW'(i)] < 0) acc[NW'(i)] <= '0;
          if (i == IW'(N_N - 1)) begin
            i     <= '0;
            state <= N_MUL;
            layer <= layer + 1'b1;
            // the clamped value of the last neuron goes straight to h
            for (int n = 0; n < N_N; n++) begin
              h[n]   <= (n == N_N - 1 && acc[n] < 0) ? '0 : acc[n];
              acc[n] <= '0;
            end
          end else begin
            i <= i + 1'b1;
          end
        end
        N_RANK: begin
          for (int n = 0; n < N_N; n++) scores[n] <= acc[n];
          for (int k = 0; k < 3; k++) top[k] <= rank[k];
          done  <= 1'b1;
          state <= N_IDLE;
        end
        default: state <= N_IDLE;
      endcase
    end
  end

  assign busy = (state != N_IDLE);
endmodule
