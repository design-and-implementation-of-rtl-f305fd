// flow_fifo: synchronous FIFO in which the first word written into an empty
// FIFO is visible at the output in the same cycle ("flow-through").
//
// A FIFO that needs a read cycle before its first word appears would add a
// dead cycle to every request crossing it; this one does not. When the FIFO
// is empty, dout shows din and empty is low while push is high, so a pop in
// that same cycle takes the word straight through without storing it.
//
// Interface: push/din write, pop/dout read (pop only when !empty), clr empties
// the FIFO synchronously (used to discard a cancelled write-back). count is
// the number of stored words. Full/empty are flags of the stored contents.
// The flow-through property follows the design; the depth/width defaults and
// the synchronous clear are this implementation's choices. In the source
// design the same FIFOs also crossed between two clock phases; here the whole
// sub-system runs on one clock.
module flow_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             stored_empty;
  logic             do_write, do_read;

  assign stored_empty = (count == 0);
  assign full         = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty        = stored_empty && !push;
  assign dout         = stored_empty ? din : mem[rd_ptr];

  // A push into an empty FIFO that is popped in the same cycle bypasses storage.
  assign do_write = push && !full && !(stored_empty && pop);
  assign do_read  = pop && !stored_empty;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_write) wr_ptr <= inc(wr_ptr);
      if (do_read)  rd_ptr <= inc(rd_ptr);
      case ({do_write, do_read})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && full |-> pop && !stored_empty)
    else $error("flow_fifo: push into a full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("flow_fifo: pop from an empty FIFO");
endmodule
