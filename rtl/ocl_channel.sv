// ocl_channel: FIFO channel between kernels and I/O interfaces.
//
// A synchronous first-in first-out buffer of DEPTH words of WIDTH bits with
// valid/ready handshakes on both sides, standing for a kernel-to-kernel or
// kernel-to-I/O channel: the writer blocks when the channel is full, the
// reader when it is empty. Storage is a circular array with read and write
// pointers; the head word is presented directly (first-word fall-through).
//
// Reset: rst_n active low, synchronous; it empties the channel.
// Interface: s_* write side, m_* read side, count = words held.
// Timing: a word written in one clock can be read in the next; one word
// per clock in and out at the same time.
// Channels as the link to the network interface follow the document; the
// depth (default 64) and the handshake are choices of this design.
module ocl_channel #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic [WIDTH-1:0]         s_data,
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic [WIDTH-1:0]         m_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;

  assign s_ready = (count < ($clog2(DEPTH)+1)'(DEPTH));
  assign m_valid = (count != '0);
  assign m_data  = mem[rp];

  wire wr = s_valid && s_ready;
  wire rd = m_valid && m_ready;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (wr) mem[wp] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (wr) wp <= inc(wp);
      if (rd) rp <= inc(rp);
      count <= count + (PW+1)'(wr) - (PW+1)'(rd);
    end
  end

  // a full channel never accepts, an empty one never delivers
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (count <= ($clog2(DEPTH)+1)'(DEPTH)) else $error("ocl_channel: overflow");
    end
  end
endmodule
