// smart_waiting_queue: input FIFO of a tunable accelerator, extended with an
// occupancy counter for the online controller.
//
// A synchronous first-word-fall-through FIFO of DEPTH entries (DEPTH a power
// of two). Alongside the data it keeps `count`, the number of waiting
// elements (N_wait), and the status flags full, almost_full (count at least
// DEPTH-AF_MARGIN) and empty. When the controller pulses `sample` at an
// observation instant, the queue copies count, almost_full and empty into a
// snapshot register and pulses `snap_valid` in the next cycle, so the
// controller always decides on one consistent view of the queue.
//
// Handshakes: a write happens in a cycle with push_valid && push_ready
// (push_ready = !full); a read in a cycle with pop_valid && pop_ready
// (pop_valid = !empty), pop_data showing the oldest element. Reading and
// writing in the same cycle is allowed. The counter and flags are
// registered state updated at the clock edge of the transfer.
//
// The queue, its counter and the full / almost-full / empty signals follow
// the described design; the almost-full margin, the snapshot register and the
// handshake are this design's choices.
module smart_waiting_queue #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned AF_MARGIN = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,      // synchronous, active low
  // write side
  input  logic                       push_valid,
  output logic                       push_ready,
  input  logic [DATA_W-1:0]          push_data,
  // read side
  output logic                       pop_valid,
  input  logic                       pop_ready,
  output logic [DATA_W-1:0]          pop_data,
  // live status
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       almost_full,
  output logic                       empty,
  // snapshot for the controller
  input  logic                       sample,
  output logic                       snap_valid,
  output logic [$clog2(DEPTH+1)-1:0] snap_count,
  output logic                       snap_almost_full,
  output logic                       snap_empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic              do_push, do_pop;

  assign full        = (count == CW'(DEPTH));
  assign empty       = (count == '0);
  assign almost_full = (count >= CW'(DEPTH - AF_MARGIN));
  assign push_ready  = !full;
  assign pop_valid   = !empty;
  assign pop_data    = mem[rd_ptr];
  assign do_push     = push_valid && push_ready;
  assign do_pop      = pop_valid && pop_ready;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      snap_valid       <= 1'b0;
      snap_count       <= '0;
      snap_almost_full <= 1'b0;
      snap_empty       <= 1'b1;
    end else begin
      snap_valid <= sample;
      if (sample) begin
        snap_count       <= count;
        snap_almost_full <= almost_full;
        snap_empty       <= empty;
      end
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("DEPTH must be a power of two");
    assert (AF_MARGIN < DEPTH) else $error("AF_MARGIN must be below DEPTH");
  end

  // count never leaves [0, DEPTH]
  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
