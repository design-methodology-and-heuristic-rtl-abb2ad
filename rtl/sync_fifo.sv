// sync_fifo -- the queue that buffers external subtask data in front of the
// lower bus.
//
// The architecture shows a queue between the external data input and the
// lower bus and counts queue overhead in the task cycle total; its depth,
// width and handshake are not specified, so this is a plain single-clock FIFO
// chosen for this design.
//
// Interface: valid/ready on both sides. A word is written when in_valid &&
// in_ready and read when out_valid && out_ready. out_data shows the oldest
// word whenever out_valid is high (first-word fall-through), so a word written
// in cycle n can be read in cycle n+1. in_ready is low when DEPTH words are
// held. Read and write in the same cycle are allowed, also when full.
// count gives the occupancy. Active-low synchronous reset empties the FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_wr, do_rd;

  assign out_valid = (count != '0);
  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign do_rd     = out_valid && out_ready;
  assign do_wr     = in_valid && in_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wr_ptr] <= in_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    32'(count) <= DEPTH);

endmodule
