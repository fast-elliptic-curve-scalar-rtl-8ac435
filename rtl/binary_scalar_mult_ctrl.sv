// Sequencer of the binary (most-significant bit first) double-and-add
// method for the elliptic-curve scalar product kP.
//
// Following k = (..((k_{m-1} 2 + k_{m-2}) 2 + ..) 2 + k_0), the sequencer
// issues Q <- P for the leading one of k, then for every lower bit k_i a
// doubling Q <- 2Q followed, when k_i = 1, by an addition Q <- Q + P.  The
// point operations themselves are performed outside, by a point unit built
// around the field multiplier; this block only orders them.
//
// The order of operations follows the published binary algorithm.  The
// command handshake, the search for the leading one of k (one clock per
// leading zero bit, so k need not have k_{m-1} = 1) and the treatment of
// k = 0 (result is the point at infinity, no command issued) are choices of
// this implementation.
//
// Interface:
//   start       pulse with the scalar k while idle (busy = 0).
//   cmd_valid/cmd_ready/cmd
//               one point-operation command (PT_COPY, PT_DOUBLE, PT_ADD);
//               after it is taken the sequencer waits for op_done, the end
//               of that operation, before issuing the next.
//   done        one-cycle pulse when kP is complete; infinity is 1 when
//               k = 0.  infinity holds its value until the next start.
module binary_scalar_mult_ctrl #(
  parameter int unsigned M = wu_mult_pkg::M_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [M-1:0]           k,
  output logic                   busy,
  output logic                   done,
  output logic                   infinity,
  output logic                   cmd_valid,
  output wu_mult_pkg::point_cmd_e cmd,
  input  logic                   cmd_ready,
  input  logic                   op_done
);

  import wu_mult_pkg::*;

  localparam int unsigned IW = $clog2(M);

  typedef enum logic [2:0] {
    S_IDLE,
    S_SCAN,
    S_ISSUE,
    S_WAIT,
    S_DONE
  } state_e;

  state_e        state;
  logic [M-1:0]  k_q;
  logic [IW-1:0] idx;

  assign busy      = (state != S_IDLE);
  assign cmd_valid = (state == S_ISSUE);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k_q      <= '0;
      idx      <= '0;
      cmd      <= PT_COPY;
      infinity <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            k_q      <= k;
            idx      <= IW'(M - 1);
            infinity <= (k == '0);
            state    <= (k == '0) ? S_DONE : S_SCAN;
          end
        end
        S_SCAN: begin
          // Look for the leading one of k: Q <- P happens there.
          if (k_q[idx]) begin
            cmd   <= PT_COPY;
            state <= S_ISSUE;
          end else begin
            idx <= idx - 1'b1;
          end
        end
        S_ISSUE: begin
          if (cmd_ready) begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (op_done) begin
            if (cmd == PT_DOUBLE && k_q[idx]) begin
              cmd   <= PT_ADD;
              state <= S_ISSUE;
            end else if (idx == '0) begin
              state <= S_DONE;
            end else begin
              idx   <= idx - 1'b1;
              cmd   <= PT_DOUBLE;
              state <= S_ISSUE;
            end
          end
        end
        S_DONE: begin
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A command stays on offer until it is taken.
  a_cmd_hold : assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
