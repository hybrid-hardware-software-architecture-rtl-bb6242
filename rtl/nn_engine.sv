// nn_engine: the network itself, a fully connected NI-NH-NH-NO perceptron
// with two hidden layers, evaluated by a finite state machine around one
// floating-point calculation unit.
//
// The machine waits in IDLE. When the input buffer is full (and the output
// buffer has been emptied by the processor) it runs one evaluation:
//   LOAD   copies the NI inputs, stored after the D weights, into a local
//          activation register file (two cycles per input);
//   WREAD / WACC walk the weights in buffer order. For every neuron the
//          buffer holds its bias first and then one weight per input of the
//          layer. WREAD presents the address, WACC uses the word: the bias
//          starts the sum, each weight adds weight*input (two cycles per word);
//   ACT    applies the activation to the sum, stores it as an input of the
//          next layer, or for the last layer writes it to the output buffer;
//   DONE   pulses done, which empties the input buffer, and returns to IDLE.
// busy is high for 2*NI + 2*D + (2*NH + NO) + 1 cycles per run, the done
// cycle included, starting the cycle after start is seen in IDLE
// (for 4-10-3: 8 + 386 + 23 + 1 = 418 cycles).
// The FSM with its idle and running phases follows the original system; the
// weight order, the serial schedule and the output-empty start condition are
// this design's choices.
module nn_engine
  import nn_pkg::*;
#(
  parameter int unsigned NI     = NI_DEF,
  parameter int unsigned NH     = NH_DEF,
  parameter int unsigned NO     = NO_DEF,
  parameter int unsigned D      = calc_d(NI, NH, NO),
  parameter int unsigned IN_AW  = $clog2(D + NI),
  parameter int unsigned OUT_AW = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // start condition
  input  logic              in_full,
  input  logic              out_empty,
  // input buffer read port (synchronous)
  output logic [IN_AW-1:0]  in_rd_addr,
  input  float32_t          in_rd_data,
  // output buffer write port
  output logic              out_wr_en,
  output logic [OUT_AW-1:0] out_wr_addr,
  output float32_t          out_wr_data,
  // status
  output logic              busy,
  output logic              done
);

  localparam int unsigned NMAX = max2(NI, NH);
  localparam int unsigned KW   = $clog2(NMAX + 1);
  localparam int unsigned NW   = $clog2(max2(NH, NO) + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD_RD, S_LOAD_WR, S_WREAD, S_WACC, S_ACT, S_DONE} state_e;

  state_e              state;
  float32_t            xin  [NMAX];   // inputs of the current layer
  float32_t            xout [NH];     // outputs of the current hidden layer
  float32_t            acc;
  logic [1:0]          layer;         // 0: first hidden, 1: second hidden, 2: output
  logic [NW-1:0]       neuron;
  logic [KW-1:0]       k;             // 0: bias, i+1: weight of input i
  logic [IN_AW-1:0]    ptr;           // next weight address
  logic [KW-1:0]       idx;           // input load index
  logic [KW-1:0]       fan_in;
  logic [NW-1:0]       nodes;
  float32_t            mac, act, xk;

  assign fan_in = (layer == 2'd0) ? KW'(NI) : KW'(NH);
  assign nodes  = (layer == 2'd2) ? NW'(NO) : NW'(NH);
  assign xk     = (k == '0) ? F_ZERO : xin[k - 1'b1];

  fp_calc u_calc (
    .acc (acc),
    .w   (in_rd_data),
    .x   (xk),
    .mac (mac),
    .z   (acc),
    .act (act)
  );

  always_comb begin
    unique case (state)
      S_LOAD_RD: in_rd_addr = IN_AW'(D) + IN_AW'(idx);
      default:   in_rd_addr = ptr;
    endcase
  end

  assign busy        = (state != S_IDLE);
  assign done        = (state == S_DONE);
  assign out_wr_en   = (state == S_ACT) && (layer == 2'd2);
  assign out_wr_addr = OUT_AW'(neuron);
  assign out_wr_data = act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      acc    <= F_ZERO;
      layer  <= '0;
      neuron <= '0;
      k      <= '0;
      ptr    <= '0;
      idx    <= '0;
      for (int i = 0; i < int'(NMAX); i++) xin[i]  <= F_ZERO;
      for (int i = 0; i < int'(NH); i++)   xout[i] <= F_ZERO;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (in_full && out_empty) begin
            idx   <= '0;
            state <= S_LOAD_RD;
          end
        end
        S_LOAD_RD: state <= S_LOAD_WR;
        S_LOAD_WR: begin
          xin[idx] <= in_rd_data;
          if (idx == KW'(NI - 1)) begin
            layer  <= '0;
            neuron <= '0;
            k      <= '0;
            ptr    <= '0;
            state  <= S_WREAD;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_LOAD_RD;
          end
        end
        S_WREAD: state <= S_WACC;
        S_WACC: begin
          acc <= (k == '0) ? in_rd_data : mac;
          ptr <= ptr + 1'b1;
          if (k == fan_in) begin
            state <= S_ACT;
          end else begin
            k     <= k + 1'b1;
            state <= S_WREAD;
          end
        end
        S_ACT: begin
          k <= '0;
          if (layer != 2'd2) begin
            xout[neuron] <= act;
          end
          if (neuron == nodes - 1'b1) begin
            neuron <= '0;
            if (layer == 2'd2) begin
              state <= S_DONE;
            end else begin
              for (int i = 0; i < int'(NH); i++) begin
                xin[i] <= (NW'(i) == neuron) ? act : xout[i];
              end
              layer <= layer + 1'b1;
              state <= S_WREAD;
            end
          end else begin
            neuron <= neuron + 1'b1;
            state  <= S_WREAD;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_ptr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WACC) |-> (int'(ptr) < int'(D)));
  a_done_ptr: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DONE) |-> (int'(ptr) == int'(D)));
`endif

endmodule
