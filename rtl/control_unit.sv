// control_unit: holds the description of the convolution layer that one call
// of the accelerator computes and hands it to every kernel.
//
// The host presents a cu_cfg_t (input width, height, channels, number of
// filters of this call, filter size, stride) with a one-cycle start pulse.
// The unit checks it, keeps it, and offers it on one shared cfg bus to four
// consumers, each with its own valid/ready pair: bit 0 input fetcher, bit 1
// weight fetcher, bit 2 output writer, bit 3 the control channel into PE0
// (PE0 passes it down the chain itself). Once all four have taken it the
// unit waits for the output writer's run_done and then pulses done. A start
// while busy is ignored; a description that the PE chain cannot run (no
// filters, more filters than PEs, zero channels, size or stride, a filter
// longer than a PE's weight store) is refused with a one-cycle err pulse.
// Splitting a layer with more filters than PEs into several calls, and
// merging their outputs, is left to the host as in the document.
module control_unit
  import cnn_pkg::*;
#(
  parameter int NUM_PE = 32,
  parameter int VEC    = 8,
  parameter int WDEPTH = 576
) (
  input  logic    clk,
  input  logic    rst_n,
  // host side
  input  logic    start,
  input  cu_cfg_t host_cfg,
  output logic    busy,
  output logic    done,
  output logic    err,
  // distribution to the kernels
  output cu_cfg_t cfg,
  output logic [3:0] cfg_valid,
  input  logic [3:0] cfg_ready,
  input  logic    run_done
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_RUN} state_t;
  state_t     state;
  logic [3:0] sent;
  logic       cfg_ok;
  int         flen;

  always_comb begin
    flen   = int'(host_cfg.size) * int'(host_cfg.size)
           * int'(chan_groups(host_cfg.c, VEC));
    cfg_ok = (host_cfg.n != 16'd0) && (int'(host_cfg.n) <= NUM_PE)
          && (host_cfg.c != 16'd0) && (host_cfg.size != 8'd0)
          && (host_cfg.stride != 8'd0) && (flen <= WDEPTH)
          && (out_dim(host_cfg.w, host_cfg.size, host_cfg.stride) != 16'd0)
          && (out_dim(host_cfg.h, host_cfg.size, host_cfg.stride) != 16'd0);
  end

  assign busy      = (state != S_IDLE);
  assign cfg_valid = (state == S_ISSUE) ? ~sent : 4'b0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sent  <= '0;
      cfg   <= '0;
      done  <= 1'b0;
      err   <= 1'b0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            if (cfg_ok) begin
              cfg   <= host_cfg;
              sent  <= '0;
              state <= S_ISSUE;
            end else begin
              err <= 1'b1;
            end
          end
        S_ISSUE: begin
          sent <= sent | (cfg_valid & cfg_ready);
          if ((sent | (cfg_valid & cfg_ready)) == 4'b1111) state <= S_RUN;
        end
        S_RUN:
          if (run_done) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
