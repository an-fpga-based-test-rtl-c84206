// Behavioural model of the PC side of the parallel-port link, for simulation
// only. It answers each strobe with an acknowledge after a random delay of
// 0-7 clock cycles, drops the acknowledge after the strobe falls (again after
// a random delay), and stores every byte it received in bytes_q.
module tb_pc_port_model (
  input  logic       clk,
  input  logic [7:0] pp_data,
  input  logic       pp_stb,
  output logic       pp_ack
);

  logic [7:0] bytes_q [$];
  int         wait_cnt = 0;

  initial pp_ack = 1'b0;

  always @(posedge clk) begin
    if (wait_cnt > 0) begin
      wait_cnt--;
    end else if (pp_stb && !pp_ack) begin
      bytes_q.push_back(pp_data);
      pp_ack   <= 1'b1;
      wait_cnt = $urandom_range(0, 7);
    end else if (!pp_stb && pp_ack) begin
      pp_ack   <= 1'b0;
      wait_cnt = $urandom_range(0, 7);
    end
  end

endmodule
