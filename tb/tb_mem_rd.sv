// tb_mem_rd: behavioural model of one read port of the host's shared memory,
// standing in for the platform's cache-coherent interconnect. Single-word
// requests are accepted when req_ready is high (randomly withheld with
// probability STALL_PCT percent); each response returns, in request order,
// at least LAT cycles later and on a randomly delayed cycle. The array mem is
// filled by the testbench through a hierarchical reference. Counts the
// cycles a request was held back (stalls) for the testbench's coverage.
module tb_mem_rd #(
  parameter int SIZE      = 4096,
  parameter int LAT       = 3,
  parameter int STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);
  logic [31:0] mem [SIZE];
  logic [31:0] q_data [$];
  longint      q_due  [$];
  longint      now = 0;
  int          stalls = 0;
  int          bad_addr = 0;

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (req_valid && req_ready) begin
      if (req_addr >= 32'(SIZE)) begin
        bad_addr++;
        q_data.push_back(32'hDEADBEEF);
      end else begin
        q_data.push_back(mem[req_addr]);
      end
      q_due.push_back(now + LAT);
    end
    if (req_valid && !req_ready) stalls++;
    if (q_due.size() != 0 && q_due[0] <= now && $urandom_range(99, 0) >= STALL_PCT) begin
      rsp_valid <= 1'b1;
      rsp_data  <= q_data.pop_front();
      void'(q_due.pop_front());
    end else begin
      rsp_valid <= 1'b0;
    end
    req_ready <= ($urandom_range(99, 0) >= STALL_PCT);
  end
endmodule
