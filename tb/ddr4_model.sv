// ddr4_model: behavioural model of the board's DDR4 global memory as seen
// through its memory-mapped read port (not synthesizable, testbench only).
//
// Answers pipelined reads of DATA_W-bit words in order after a random
// latency of MIN_LAT..MAX_LAT clocks, and raises waitrequest at random
// (one clock in STALL_PCT percent) while stall_en is high. Instead of storing data, the word at a
// byte address is generated by word_at(): 32-bit sample i of the word at
// address a is {16'(a/4 + i) ^ 16'h5a5a, 16'(a/4 + i)}. Counts the read
// commands it accepted and the clocks it stalled.
module ddr4_model #(
  parameter int ADDR_W    = 34,
  parameter int DATA_W    = 1024,
  parameter int MIN_LAT   = 2,
  parameter int MAX_LAT   = 12,
  parameter int STALL_PCT = 20
) (
  input  logic              clk,
  input  logic              stall_en,
  input  logic [ADDR_W-1:0] address,
  input  logic              read,
  output logic              waitrequest,
  output logic [DATA_W-1:0] readdata,
  output logic              readdatavalid
);
  int reads = 0, stalls = 0;
  longint cycle = 0;
  longint due [$];
  logic [ADDR_W-1:0] addr_q [$];

  function automatic logic [DATA_W-1:0] word_at(input logic [ADDR_W-1:0] a);
    logic [DATA_W-1:0] w;
    logic [15:0] v;
    for (int i = 0; i < DATA_W / 32; i++) begin
      v = 16'(a / 4 + ADDR_W'(i));
      w[32*i +: 32] = {v ^ 16'h5a5a, v};
    end
    return w;
  endfunction

  initial begin
    waitrequest = 1'b0;
    readdatavalid = 1'b0;
    readdata = '0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (read && !waitrequest) begin
      reads <= reads + 1;
      // keep return order: never earlier than the previous one
      due.push_back(((due.size() != 0) && (due[$] >= cycle + longint'(MIN_LAT))) ?
                    due[$] + 1 : cycle + longint'($urandom_range(MIN_LAT, MAX_LAT)));
      addr_q.push_back(address);
    end
    if (read && waitrequest) stalls <= stalls + 1;
    waitrequest <= stall_en && ($urandom_range(0, 99) < STALL_PCT);
    if (due.size() != 0 && due[0] <= cycle) begin
      readdatavalid <= 1'b1;
      readdata <= word_at(addr_q[0]);
      void'(due.pop_front());
      void'(addr_q.pop_front());
    end else begin
      readdatavalid <= 1'b0;
    end
  end
endmodule
