// ldpc_ctrl: layer sequencer of the two-section pipeline.
//
// A frame is decoded as ITERS x LAYERS layer steps in fixed order. On start
// (accepted only while idle) the mux register is loaded with layer 0. From
// then on, every cycle one layer is in section A (a_valid, a_layer) and the
// previous one in section B (b_valid, b_layer), and the mux register is loaded
// with the layer after the one in section A. The first LAYERS steps form the
// first iteration (first_iter), in which stored check messages are replaced by
// zero. When the last layer leaves section B its results are written and done
// rises; done stays high until the next start.
//
// Timing: with start sampled at clock edge 0, the last write-back happens at
// edge ITERS*LAYERS + 1, the same edge at which done is set, i.e. 121 cycles
// for 12 layers and 10 iterations, the cycle count the published design gives for its
// decoder. Handshake (start/busy/done) is this design's choice.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int ITERS = ITER
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  output logic   mux_load,
  output layer_t sel_layer,
  output logic   first_iter,
  output logic   a_valid,
  output layer_t a_layer,
  output logic   b_valid,
  output layer_t b_layer
);

  localparam int TOTAL = ITERS * LAYERS;
  localparam int CW    = $clog2(TOTAL + 1);

  logic [CW-1:0] a_cnt;
  logic          b_last;
  logic          start_ok, more;

  assign busy     = a_valid || b_valid;
  assign start_ok = start && !busy;
  assign more     = a_valid && (a_cnt != CW'(TOTAL - 1));
  assign mux_load = start_ok || more;

  always_comb begin
    if (start_ok) begin
      sel_layer  = '0;
      first_iter = 1'b1;
    end else begin
      sel_layer  = (a_layer == layer_t'(LAYERS - 1)) ? '0 : a_layer + 1'b1;
      first_iter = (a_cnt + 1'b1) < CW'(LAYERS);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_layer <= '0;
      a_cnt   <= '0;
      b_valid <= 1'b0;
      b_layer <= '0;
      b_last  <= 1'b0;
      done    <= 1'b0;
    end else begin
      a_valid <= mux_load;
      if (mux_load) begin
        a_layer <= sel_layer;
        a_cnt   <= start_ok ? '0 : a_cnt + 1'b1;
      end
      b_valid <= a_valid;
      b_layer <= a_layer;
      b_last  <= a_valid && (a_cnt == CW'(TOTAL - 1));
      if (start_ok)               done <= 1'b0;
      else if (b_valid && b_last) done <= 1'b1;
    end
  end

endmodule
