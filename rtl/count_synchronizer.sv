// count_synchronizer: carries a multi-bit stall count from the clock domain
// of one island into the clock domain of the island at the other end of a
// FIFO link.
//
// A toggle handshake keeps the bus coherent.  When load pulses in the source
// domain and no transfer is in flight, the value is captured in a source
// register and a request bit toggles.  The request is passed through two
// flops into the destination domain; when it is seen to change, the captured
// value (stable by then) is copied to q and q_valid pulses for one dst_clk
// cycle.  The destination echoes the request back as an acknowledge, again
// through two flops, which frees the source for the next value.  A load that
// arrives while a transfer is still in flight is dropped; with stall counts
// produced once per sampling window of thousands of cycles this does not
// occur unless the two clocks differ by orders of magnitude.
//
// Latency: about three dst_clk cycles from load to q_valid; the next load is
// accepted about three src_clk cycles after that.
module count_synchronizer #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             src_clk,
  input  logic             src_rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic             busy,

  input  logic             dst_clk,
  input  logic             dst_rst_n,
  output logic [WIDTH-1:0] q,
  output logic             q_valid
);

  logic [WIDTH-1:0] hold;
  logic req_t, ack_s1, ack_s2;
  logic req_s1, req_s2, req_s3, ack_t;

  // Source side.
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold   <= '0;
      req_t  <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack_t;
      ack_s2 <= ack_s1;
      if (load && !busy) begin
        hold  <= d;
        req_t <= ~req_t;
      end
    end
  end

  assign busy = (req_t != ack_s2);

  // Destination side.
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_s1  <= 1'b0;
      req_s2  <= 1'b0;
      req_s3  <= 1'b0;
      ack_t   <= 1'b0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      req_s1  <= req_t;
      req_s2  <= req_s1;
      req_s3  <= req_s2;
      q_valid <= 1'b0;
      if (req_s2 != req_s3) begin
        q       <= hold;
        q_valid <= 1'b1;
        ack_t   <= req_s2;
      end
    end
  end

endmodule
