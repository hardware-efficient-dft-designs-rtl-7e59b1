// dft_controller: block sequencing and flow control of the prime-length DFT pipeline.
//
// One transform takes M = (N-1)/2 cycles of each pipeline section, and adjacent transforms
// follow each other with no gap. The pipeline has three sections that each hold one block:
//   write  (W): the permutation stage stores the incoming block into the free bank pair,
//   filter (F): the read bank pair feeds the u/v adders and filter stages, one cycle behind
//               W because the banks have a registered read port,
//   output (O): the PISOs shift the finished block out, two outputs per cycle.
// A single enable, adv, moves every register of the datapath. Inside a block that carries data
// adv follows in_valid, so a source that pauses stalls the whole pipeline. At a block start
// with no input waiting but blocks still in flight, the controller inserts an empty (bubble)
// block that runs on without input, so the last real block drains out. The document fixes the
// block length, the bank ping-pong and the PISO load at the last cycle of a block; the
// handshake, the stall and the bubble blocks are this design's own.
//
// Interface: in_valid/in_ready accept one input pair per cycle (in_ready is low only during a
// bubble block). Outputs are the enable, write phase, bank select and the F/O section controls.
// Timing: ph counts 0..M-1 for the W section; ph_f is ph delayed by one advance.
module dft_controller #(
  parameter  int N  = 61,
  localparam int M  = (N - 1) / 2,
  localparam int PHW = (M > 1) ? $clog2(M) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  output logic           adv,        // global advance enable
  output logic           wr_en,      // write the current input pair into the banks
  output logic           wr_sel,     // bank pair being written (the other pair is read)
  output logic [PHW-1:0] ph,         // W section phase
  output logic [PHW-1:0] ph_f,       // F/O section phase (PISO slot)
  output logic           f_first,    // F section: first cycle of a block
  output logic           f_last,     // F section: last cycle of a block (PISO load)
  output logic           f_valid,    // F section holds a real block
  output logic           o_valid,    // O section holds a real block
  output logic           bubble      // W section is running an empty block
);

  logic rd_valid;   // block in the read banks is real (W/F boundary)
  logic pending;
  logic w_last;

  assign pending  = rd_valid | f_valid | o_valid;
  assign w_last   = (ph == PHW'(M - 1));
  assign in_ready = (ph == '0) ? 1'b1 : !bubble;

  always_comb begin
    if (ph == '0) adv = in_valid | pending;
    else          adv = bubble | in_valid;
  end

  assign wr_en   = adv & in_valid & in_ready;
  assign f_first = (ph_f == '0);
  assign f_last  = (ph_f == PHW'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph       <= '0;
      ph_f     <= PHW'(M - 1);
      bubble   <= 1'b0;
      wr_sel   <= 1'b0;
      rd_valid <= 1'b0;
      f_valid  <= 1'b0;
      o_valid  <= 1'b0;
    end else if (adv) begin
      ph   <= w_last ? '0 : ph + 1'b1;
      ph_f <= ph;
      if (ph == '0) bubble <= !in_valid;
      if (w_last) begin
        wr_sel   <= !wr_sel;
        rd_valid <= !bubble;
      end
      // F section enters a new block one cycle after W
      if (ph == '0) f_valid <= rd_valid;
      if (f_last) o_valid <= f_valid;
    end
  end

  // The phase counters always stay within a block.
  assert property (@(posedge clk) disable iff (!rst_n) int'(ph) < M && int'(ph_f) < M);
  // Inputs are only taken when the controller is ready for them.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> in_ready);

endmodule
