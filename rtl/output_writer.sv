// output_writer: the kernel that takes the results from the end of the PE
// chain and writes them to host memory.
//
// Results arrive pixel by pixel, and within a pixel filter by filter (the
// order the daisy chain produces). The host expects planar output maps,
// one whole map per filter, so each result of filter f at pixel p (row-major
// over out_h x out_w) is written to word base + f*out_h*out_w + p: the
// reordering is done by the write address. Every result is widened from FP16
// to FP32 on the way. After n*out_h*out_w writes the writer pulses run_done
// and is ready for the next call. Maps of a layer computed in several calls
// are merged by the host, which picks base for each call.
//
// Timing: combinational from r_* to the write port, one result per cycle
// when wr_ready is high; r_ready follows wr_ready while a call is running.
module output_writer
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  cu_cfg_t     cfg,
  input  logic [31:0] base,
  input  logic        r_valid,
  output logic        r_ready,
  input  fp16_t       r_data,
  output logic        wr_valid,
  input  logic        wr_ready,
  output logic [31:0] wr_addr,
  output fp32_t       wr_data,
  output logic        run_done
);
  logic        busy;
  logic [31:0] base_q, npix, pix;
  logic [15:0] n, f;
  logic        last;

  assign cfg_ready = !busy;
  assign wr_valid  = busy && r_valid;
  assign r_ready   = busy && wr_ready;
  assign wr_addr   = base_q + 32'(f) * npix + pix;
  assign last      = (f == n - 16'd1) && (pix == npix - 32'd1);

  fp16_to_fp32 u_cvt (.a(r_data), .y(wr_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      base_q   <= '0;
      npix     <= '0;
      n        <= '0;
      f        <= '0;
      pix      <= '0;
      run_done <= 1'b0;
    end else begin
      run_done <= 1'b0;
      if (!busy) begin
        if (cfg_valid) begin
          busy   <= 1'b1;
          base_q <= base;
          npix   <= 32'(out_dim(cfg.h, cfg.size, cfg.stride))
                  * 32'(out_dim(cfg.w, cfg.size, cfg.stride));
          n      <= cfg.n;
          f      <= '0;
          pix    <= '0;
        end
      end else if (wr_valid && wr_ready) begin
        if (f == n - 16'd1) begin
          f   <= '0;
          pix <= pix + 32'd1;
        end else begin
          f <= f + 16'd1;
        end
        if (last) begin
          busy     <= 1'b0;
          run_done <= 1'b1;
        end
      end
    end
  end
endmodule
