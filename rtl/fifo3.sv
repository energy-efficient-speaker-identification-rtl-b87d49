// fifo3: small synchronous FIFO, three entries deep by default.
//
// The document separates each stage of the data flow with 3-element FIFOs, as
// in Eyeriss; here one sits between the deserializer and the PU array. Push
// and pop may happen in the same cycle. dout shows the head entry while empty
// is low (first-word fall-through). count lets the producer stall before the
// FIFO fills; almost_full is high with DEPTH-1 or more entries.
module fifo3 #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  assign empty       = (count == '0);
  assign full        = (int'(count) == DEPTH);
  assign almost_full = (int'(count) >= DEPTH - 1);
  assign dout        = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop && !empty) rd_ptr <= inc(rd_ptr);
      count <= count + (($clog2(DEPTH+1))'(push && !full)) - (($clog2(DEPTH+1))'(pop && !empty));
    end
  end

  // Handshake rules: never push into a full FIFO, never pop an empty one.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("fifo3: push while full");
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("fifo3: pop while empty");
endmodule
