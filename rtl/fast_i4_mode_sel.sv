// Three-step Intra4x4 mode selector.
//
// Chooses the prediction mode of a 4x4 block after costing only six of
// the nine modes, using the fact that modes whose directions are next to
// the best direction also have small costs:
//   step 1: vertical (0), horizontal (1) and DC (2);
//   step 2: the two 22.5-degree neighbours of the cheaper of vertical and
//           horizontal: 5 and 7 next to vertical, 6 and 8 next to
//           horizontal;
//   step 3: the remaining diagonal next to the cheaper step-2 mode:
//           4 for modes 5 and 6, 3 for modes 7 and 8.
// The result is the cheapest of the six modes costed.  Costing itself
// (prediction, residual, cost function) is outside: the selector asks for
// one mode at a time on req_valid/req_mode and waits for cost_valid/cost.
// Ties go to vertical in step 1 and to the mode costed first elsewhere.
//
// The three steps and the mode sets of steps 1 and 2 follow the document.
// In step 3, 4 after 5 or 6 and 3 after 7 follow the mode directions;
// mode 8 (horizontal-up) has no diagonal beside it, and taking 3 after 8
// is this design's choice, as are the tie rules and the handshake.
//
// Timing: start (while idle) begins a block; done pulses for one cycle
// with best_mode/best_cost once the sixth cost has come back.  One cycle
// per request plus the cost latency of the environment.
module fast_i4_mode_sel #(
  parameter int unsigned SW = 24    // cost width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          req_valid,
  output logic [3:0]    req_mode,
  input  logic          cost_valid,
  input  logic [SW-1:0] cost,
  output logic          done,
  output logic [3:0]    best_mode,
  output logic [SW-1:0] best_cost,
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;

  state_e        state;
  logic [2:0]    n;          // number of costs received so far
  logic [SW-1:0] cost_v, cost_h, cost_s2a, cost_s2b;
  logic [3:0]    mode_cur, s2a_mode;

  // Mode to cost as evaluation number n (0..5).
  function automatic logic [3:0] mode_of(logic [2:0] i, logic vert, logic [3:0] s2_best);
    case (i)
      3'd0: return 4'd0;
      3'd1: return 4'd1;
      3'd2: return 4'd2;
      3'd3: return vert ? 4'd5 : 4'd6;
      3'd4: return vert ? 4'd7 : 4'd8;
      default: return (s2_best == 4'd5 || s2_best == 4'd6) ? 4'd4 : 4'd3;
    endcase
  endfunction

  logic       vert;
  logic [3:0] s2_best;

  always_comb begin
    vert     = (cost_v <= cost_h);
    // cheaper step-2 mode: the first one unless the second is strictly cheaper
    s2_best  = (n == 3'd5 && cost_s2a > cost_s2b) ? (vert ? 4'd7 : 4'd8) : s2a_mode;
    mode_cur = mode_of(n, vert, s2_best);
  end

  assign req_valid = (state == S_REQ);
  assign req_mode  = mode_cur;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; n <= '0; done <= 1'b0;
      cost_v <= '0; cost_h <= '0; cost_s2a <= '0; cost_s2b <= '0; s2a_mode <= '0;
      best_mode <= '0; best_cost <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin state <= S_REQ; n <= '0; end
        S_REQ:  state <= S_WAIT;
        S_WAIT: if (cost_valid) begin
          case (n)
            3'd0: cost_v <= cost;
            3'd1: cost_h <= cost;
            3'd3: begin cost_s2a <= cost; s2a_mode <= mode_cur; end
            3'd4: cost_s2b <= cost;
            default: ;
          endcase
          if (n == 3'd0 || cost < best_cost) begin
            best_cost <= cost;
            best_mode <= mode_cur;
          end
          if (n == 3'd5) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            n     <= n + 3'd1;
            state <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
