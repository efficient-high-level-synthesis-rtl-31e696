// stream_fifo: small valid/ready FIFO that couples two processing blocks.
//
// Each block of the detector runs on its own schedule; between them sits a
// short first-in first-out queue, so that a producer can hand over a vector
// while the consumer is still busy with the previous one. The element type
// is a parameter. Storage is a register array with read and write pointers
// and an occupancy count.
//
// Interface: in_valid/in_ready and out_valid/out_ready with the usual rule
// (a transfer happens in a clock where both are high); empty is high when
// nothing is stored. Timing: an element written in clock t can be read from
// clock t+1; a full FIFO still accepts in a clock where it is being read.
// The queue between blocks follows the source's description of the
// block-to-block channels as FIFOs; the depth (2) is this design's choice.
module stream_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic empty
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  T              mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [CW-1:0] cnt;

  wire do_rd = out_valid && out_ready;
  wire do_wr = in_valid && in_ready;

  assign out_valid = (cnt != '0);
  assign empty     = (cnt == '0);
  assign in_ready  = (32'(cnt) < DEPTH) || out_ready;
  assign out_data  = mem[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      cnt <= cnt + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(cnt) <= DEPTH);

endmodule
