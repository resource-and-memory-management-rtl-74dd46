// hw_barrier: hardware barrier, a counter that threads reach by loads and stores.
//
// A store to word 0 announces that a thread has arrived: the arrival counter
// counts up, and when it reaches the number of participants it returns to zero
// and the generation number counts up. A load returns the generation number. A
// thread reads the generation, stores its arrival, then polls with loads until
// the generation differs from the one it read; because the count restarts by
// itself, the same barrier can be reused at once. A store to word 1 sets the
// number of participants (pthread_barrier_init) and clears the counter.
// Interface: en, we, addr (bit 0 selects the word), wdata in; rdata out.
// Timing: load result 1 cycle after the access.
// The counter accessed by loads and stores follows the design description; the
// generation scheme, the word map and the participant register are this design's
// own choices, since the description gives no more detail.
module hw_barrier #(
  parameter int unsigned W         = 32,
  parameter int unsigned N_PARTIES = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         we,
  input  logic         addr,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);
  logic [W-1:0] parties_q, count_q, gen_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      parties_q <= W'(N_PARTIES);
      count_q   <= '0;
      gen_q     <= '0;
      rdata     <= '0;
    end else if (en) begin
      if (!we) begin
        rdata <= gen_q;
      end else if (addr) begin
        parties_q <= wdata;
        count_q   <= '0;
      end else if (count_q + 1'b1 >= parties_q) begin
        count_q <= '0;
        gen_q   <= gen_q + 1'b1;
      end else begin
        count_q <= count_q + 1'b1;
      end
    end
  end
endmodule
