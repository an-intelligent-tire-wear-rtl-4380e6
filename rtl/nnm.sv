// NNM - "neural net middle": one node of the wide middle (hidden) layer.
//
// The middle layer is the widest layer, so the network is parallelised along
// it: the top instantiates one NNM per middle-layer node. Each NNM takes all
// N_IN network inputs and produces one product for each of the N_OUT
// third-layer nodes:
//     h    = ReLU(bias + sum_i w_in[i] * x[i])
//     y[j] = h * w_out[j]
// All products go through a single fixed-point multiplier, one per cycle.
//
// Weights live in the NNM's own RAM (m10k_ram), one word per address:
//     address 0                  bias
//     addresses 1 .. N_IN         input weights w_in[0..N_IN-1]
//     addresses N_IN+1 .. LAST    output weights w_out[0..N_OUT-1]
// One address counter (weight_addr_counter) serves writes and reads and
// overflows to zero after LAST.
//
// Sequencer (seven states, as in the design):
//   WRITE  after reset; each wr_en writes wr_data at the counter and advances
//          it. The write of the last weight overflows the counter to 0 and the
//          NNM moves on to compute once on the current inputs.
//   STALL1 counter is 0 and advances; STALL2 advances again. They cover the
//          two-cycle RAM read delay.
//   BIAS   address 0 arrives: the bias is loaded into the sum register.
//   MAC    N_IN cycles; cycle i adds x[i] * w_in[i] to the sum register.
//   OUT    N_OUT cycles; cycle j writes h * w_out[j] to y[j]. In the first of
//          these cycles the ReLU is applied: a negative sum is replaced by 0 in
//          the sum register and that value is used from then on.
//   DONE   done is high and y holds; the counter is cleared.
// A start pulse in any state except WRITE sends the NNM back to STALL1 to
// compute on the present inputs. From start to done: 4 + N_IN + N_OUT cycles
// (start seen in cycle t, done high from cycle t + 4 + N_IN + N_OUT).
//
// x must stay stable from the start pulse until done. Taking a start during
// computation as a restart follows the design (the ready signal returns all
// state machines to their initial state); leaving WRITE into computation and
// ignoring start in WRITE are this design's choices.
module nnm
  import tire_nn_pkg::*;
#(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_OUT = 16,
  localparam int unsigned LAST = N_IN + N_OUT,          // index of last weight
  localparam int unsigned AW   = $clog2(LAST + 1),
  localparam int unsigned KMAX = (N_IN > N_OUT) ? N_IN : N_OUT,
  localparam int unsigned KW   = (KMAX > 1) ? $clog2(KMAX) : 1
) (
  input  logic clk,
  input  logic rst,
  input  logic wr_en,               // write one weight (only in WRITE)
  input  fx_t  wr_data,
  input  logic start,               // compute on x (one-cycle pulse)
  input  fx_t  x [N_IN],            // network inputs
  output fx_t  y [N_OUT],           // h * w_out[j], one per third-layer node
  output logic done,                // y valid
  output logic loaded               // all weights written
);
  nnm_state_e state, state_n;

  logic [AW-1:0] addr;
  logic          addr_wrap;
  logic          addr_inc, addr_clr;
  fx_t           rd_data;

  fx_t           acc;               // bias, then running sum, then ReLU(sum)
  logic [KW-1:0] k;                 // input / output index
  fx_t           mul_a, mul_p;
  fx_t           relu_acc;

  // ---------------------------------------------------------------- storage
  weight_addr_counter #(.LAST(LAST)) u_cnt (
    .clk, .rst,
    .clr  (addr_clr),
    .inc  (addr_inc),
    .count(addr),
    .wrap (addr_wrap)
  );

  m10k_ram #(.WIDTH(FX_W), .DEPTH(LAST + 1)) u_ram (
    .clk,
    .wr_en  (state == NNM_WRITE && wr_en),
    .wr_addr(addr),
    .wr_data(wr_data),
    .rd_addr(addr),
    .rd_data(rd_data)
  );

  // ------------------------------------------------------------ multiplier
  assign relu_acc = fx_relu(acc);

  always_comb begin
    if (state == NNM_OUT) mul_a = (k == '0) ? relu_acc : acc;
    else                  mul_a = x[k];
  end

  fxp_mul u_mul (.a(mul_a), .b(rd_data), .p(mul_p));

  // ------------------------------------------------------------- sequencer
  always_comb begin
    state_n  = state;
    addr_inc = 1'b0;
    addr_clr = 1'b0;
    unique case (state)
      NNM_WRITE: begin
        addr_inc = wr_en;
        if (addr_wrap) state_n = NNM_STALL1;
      end
      NNM_STALL1, NNM_STALL2, NNM_BIAS: begin
        addr_inc = 1'b1;
        state_n  = nnm_state_e'(state + 3'd1);
      end
      NNM_MAC: begin
        addr_inc = 1'b1;
        if (k == KW'(N_IN - 1)) state_n = NNM_OUT;
      end
      NNM_OUT: begin
        addr_inc = 1'b1;
        if (k == KW'(N_OUT - 1)) state_n = NNM_DONE;
      end
      NNM_DONE: addr_clr = 1'b1;
      default:  state_n = NNM_WRITE;
    endcase
    if (start && state != NNM_WRITE) begin
      state_n  = NNM_STALL1;
      addr_inc = 1'b0;
      addr_clr = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= NNM_WRITE;
    else     state <= state_n;
  end

  // -------------------------------------------------------------- datapath
  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      k      <= '0;
      loaded <= 1'b0;
      for (int j = 0; j < int'(N_OUT); j++) y[j] <= '0;
    end else begin
      if (addr_wrap && state == NNM_WRITE) loaded <= 1'b1;
      if (state_n == NNM_STALL1) k <= '0;
      unique case (state)
        NNM_BIAS: begin
          acc <= rd_data;
          k   <= '0;
        end
        NNM_MAC: begin
          acc <= fx_add(acc, mul_p);
          k   <= (k == KW'(N_IN - 1)) ? '0 : k + 1'b1;
        end
        NNM_OUT: begin
          if (k == '0) acc <= relu_acc;
          y[k] <= mul_p;
          k    <= k + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign done = (state == NNM_DONE);

  // The sequencer only ever holds one of its seven states.
  a_state_legal: assert property (@(posedge clk) disable iff (rst)
                                  state inside {NNM_WRITE, NNM_STALL1, NNM_STALL2,
                                                NNM_BIAS, NNM_MAC, NNM_OUT, NNM_DONE});
endmodule
