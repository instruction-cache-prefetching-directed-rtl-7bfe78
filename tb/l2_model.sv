// l2_model: behavioural model of the lower level memory (a unified L2 cache
// that always hits), for testbenches only.
//
// Non-pipelined and non-preemptive: it accepts a line request when idle
// (req_ready high), and LATENCY cycles after the accepting edge it holds
// resp_valid high for one cycle with the whole line on resp_data. Each
// 32-bit word of the line is the word's byte address XOR 32'hA5C3_0F00, so
// a testbench can tell which address any delivered instruction came from.
// accepted counts the requests taken.
module l2_model
  import bib_pkg::*;
#(
  parameter int unsigned LATENCY = 3
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  input  laddr_t req_line,
  output logic   req_ready,
  output logic   resp_valid,
  output line_t  resp_data,
  output int     accepted
);
  logic   busy;
  int     count;
  laddr_t line_q;

  function automatic line_t line_data(laddr_t l);
    line_t d;
    for (int w = 0; w < LINE_BYTES / 4; w++)
      d[w*32 +: 32] = {l, 4'(w * 4)} ^ 32'hA5C3_0F00;
    return d;
  endfunction

  assign req_ready  = !busy;
  assign resp_valid = busy && count == int'(LATENCY);
  assign resp_data  = line_data(line_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      count    <= 0;
      line_q   <= '0;
      accepted <= 0;
    end else if (!busy) begin
      if (req_valid) begin
        busy     <= 1'b1;
        count    <= 1;
        line_q   <= req_line;
        accepted <= accepted + 1;
      end
    end else if (resp_valid) begin
      busy  <= 1'b0;
      count <= 0;
    end else begin
      count <= count + 1;
    end
  end
endmodule
