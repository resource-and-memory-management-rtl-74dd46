// hw_lock: hardware mutex that threads reach by loads and stores, like a
// shared-local memory with one word.
//
// A load tries to take the lock: it returns 1 if the lock was free, and the lock
// becomes taken in the same access; it returns 0 if the lock was already taken.
// A thread therefore polls with loads until it reads 1. A store, by the owner,
// frees the lock. Each lock has its own ports, so different locks are used
// concurrently; contention for one lock is resolved by the arbiter in front.
// Interface: en, we in; rdata out (0 or 1 in bit 0; the upper bits are always 0,
// the word is full width only because threads read it like a memory word).
// Timing: load result 1 cycle after the access, like other shared-local memories.
// Load-acquire, store-release and the 1/0 return values follow the design
// description; the 1-cycle latency and the free state after reset are this
// design's choice.
module hw_lock #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         we,
  output logic [W-1:0] rdata
);
  logic locked_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      rdata    <= '0;
    end else if (en) begin
      if (we) begin
        locked_q <= 1'b0;
      end else begin
        rdata    <= W'(!locked_q);
        locked_q <= 1'b1;
      end
    end
  end

  a_release_owned: assert property (@(posedge clk) disable iff (!rst_n) (en && we) |-> locked_q);
endmodule
