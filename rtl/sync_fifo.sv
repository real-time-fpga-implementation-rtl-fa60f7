// sync_fifo: small single-clock FIFO with first-word fall-through output.
//
// dout shows the oldest entry whenever `empty` is low; `pop` removes it.
// A push into a full FIFO or a pop from an empty one is a usage error, caught
// by assertions in simulation; the push is then dropped.
// In mrs_top it holds each window token while its features and class are
// computed; the reference design does not describe this buffer, it is this
// implementation's own. Lint reports rst_n as used both asynchronously and
// synchronously: the synchronous use is only the `disable iff` of the
// assertions, which are not hardware.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == (AW+1)'(DEPTH));
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push && !full) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop && !empty) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
