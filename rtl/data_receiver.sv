// data_receiver: data half of the deadlock-prevention pair on a master interface.
//
// When a function's concurrent requests are granted in different cycles, their
// data also returns in different cycles, yet the function reads all of it in the
// cycle after its last access completes. The receiver tracks its own granted
// access with a shift register as long as the slave latency: a 1 enters the LSB
// on a grant and reaches the MSB in the cycle the slave returns the data. In that
// cycle the data is passed straight through to the master and also stored; in
// every other cycle the stored copy is presented.
// For a variable-latency slave (VARIABLE=1) the tracking is a single pending bit,
// set by a grant and cleared by the slave's valid, which marks the return cycle.
// Interface: grant in, s_rdata/s_valid in (slave side), m_rdata out (master side).
// Timing: LAT cycles from grant to data for a fixed-latency slave.
// The shift register, pass-through and hold follow the design description; the
// pending bit for VARIABLE=1 (one outstanding access per interface) is this
// design's choice. LAT must be at least 1; 0-latency slaves need no receiver.
module data_receiver #(
  parameter int unsigned LAT      = 1,
  parameter int unsigned W        = 32,
  parameter bit          VARIABLE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         grant,
  input  logic         s_valid,
  input  logic [W-1:0] s_rdata,
  output logic [W-1:0] m_rdata
);
  logic [LAT-1:0] track_q;
  logic [W-1:0]   hold_q;
  logic           ret;

  if (VARIABLE) begin : g_var
    assign ret = track_q[0] & s_valid;
    always_ff @(posedge clk) begin
      if (!rst_n)      track_q <= '0;
      else if (grant)  track_q <= LAT'(1);
      else if (ret)    track_q <= '0;
    end
  end else if (LAT == 1) begin : g_fixed1
    assign ret = track_q[0];
    always_ff @(posedge clk) begin
      if (!rst_n) track_q <= '0;
      else        track_q <= grant;
    end
  end else begin : g_fixedn
    assign ret = track_q[LAT-1];
    always_ff @(posedge clk) begin
      if (!rst_n) track_q <= '0;
      else        track_q <= {track_q[LAT-2:0], grant};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   hold_q <= '0;
    else if (ret) hold_q <= s_rdata;
  end

  assign m_rdata = ret ? s_rdata : hold_q;
endmodule
