// capture_buffer: records the measured I/Q of a pulse for the host.
//
// At pulse start the write pointer rewinds; while the pulse is open one
// sample in every `stride` (0 counts as 1) is written as {I, Q} into a
// DEPTH-entry RAM until it is full. The host reads entries through a
// synchronous read port and learns how many were written from `count`.
// Uploading measured I/Q for monitoring and recording comes from the PEFP prototype; the
// on-chip RAM, its depth and the stride are this design's choices.
//
// Timing: the sample present on the start cycle is the first one stored.
// rdata holds the entry at raddr one clock after raddr is presented.
module capture_buffer #(
  parameter int IQ_W     = 16,
  parameter int DEPTH    = 1024,
  parameter int STRIDE_W = 16,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   active,
  input  logic [STRIDE_W-1:0]    stride,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  input  logic [AW-1:0]          raddr,
  output logic [2*IQ_W-1:0]      rdata,
  output logic [AW:0]            count,
  output logic                   full
);

  logic [2*IQ_W-1:0]   mem [DEPTH];
  logic [STRIDE_W-1:0] skip;      // samples still to drop before the next write
  logic                we;
  logic [AW-1:0]       waddr;

  assign full  = (count == (AW+1)'(DEPTH));
  // on the start cycle the pointer is rewound and the sample is stored at 0
  assign we    = (start || active) && (start || (!full && skip == '0));
  assign waddr = start ? '0 : count[AW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {in_i, in_q};
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      skip  <= '0;
    end else if (we) begin
      count <= (start ? '0 : count) + (AW+1)'(1);
      skip  <= (stride > 1) ? stride - STRIDE_W'(1) : '0;
    end else if (active && skip != '0) begin
      skip <= skip - STRIDE_W'(1);
    end
  end

endmodule
