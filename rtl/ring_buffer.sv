// ring_buffer: a circular buffer with two real ports, one that writes and
// one that reads, both usable in the same cycle.
//
// DEPTH words are kept in an array addressed by a write pointer and a read
// pointer that wrap around; a count tells full from empty. A write into a
// full buffer and a read from an empty one are ignored. The read port shows
// the oldest word on rd_data whenever the buffer is not empty (first-word
// fall-through); rd_en takes it. The source names this buffer and its two
// ports but not its use, width or depth: those are this design's choice.
//
// Timing: writes and reads take effect at the rising edge; full, empty and
// count reflect the state after the last edge. Synchronous active-low reset
// empties the buffer.
module ring_buffer
  import bn_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int W     = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  // read port
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_wr, do_rd;

  initial assert (DEPTH >= 2 && DEPTH == (1 << PW)) else $error("DEPTH must be a power of two");

  assign full    = (int'(count) == DEPTH);
  assign empty   = (count == 0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= wp + PW'(1);
      if (do_rd) rp <= rp + PW'(1);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
