// mem_model: behavioural model of the memory below the last cache level, for
// testbenches only. It accepts one line request per cycle (ready can be
// throttled with STALL_PCT), and returns each line LAT cycles later, in order,
// with the contents line_pattern(address). A testbench can hold all returns
// back with hold_i to keep misses in flight as long as it likes.
module mem_model
  import ios_pkg::*;
  import tb_ios_pkg::*;
#(
  parameter int unsigned LAT       = 10,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       hold_i,
  input  logic       req_valid_i,
  output logic       req_ready_o,
  input  line_addr_t req_addr_i,
  output logic       resp_valid_o,
  output line_addr_t resp_addr_o,
  output line_data_t resp_data_o,
  output int         n_req_o
);
  line_addr_t q_addr [$];
  longint     q_due  [$];
  longint     cyc;
  logic       stall;

  assign req_ready_o = !stall;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cyc          <= 0;
      n_req_o      <= 0;
      resp_valid_o <= 1'b0;
      stall        <= 1'b0;
      q_addr.delete();
      q_due.delete();
    end else begin
      cyc          <= cyc + 1;
      stall        <= (int'($urandom_range(99)) < int'(STALL_PCT));
      resp_valid_o <= 1'b0;
      if (req_valid_i && req_ready_o) begin
        q_addr.push_back(req_addr_i);
        q_due.push_back(cyc + longint'(LAT));
        n_req_o <= n_req_o + 1;
      end
      if (!hold_i && q_addr.size() > 0 && q_due[0] <= cyc) begin
        resp_valid_o <= 1'b1;
        resp_addr_o  <= q_addr[0];
        resp_data_o  <= line_pattern(q_addr[0]);
        void'(q_addr.pop_front());
        void'(q_due.pop_front());
      end
    end
  end
endmodule
