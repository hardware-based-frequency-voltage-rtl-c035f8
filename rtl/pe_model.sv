// pe_model: producer/consumer model of one processing element (PE), the task
// that runs inside an island.
//
// The PE repeats one task per data item: it reads one item from every input
// FIFO, spends WORK_CYCLES cycles computing, then writes one item to every
// output FIFO.  Its computation is modelled only by its duration, as a task
// graph gives a cycle count per task.  The item it forwards is the item of
// input 0, so a sequence number issued by the source travels unchanged to the
// sink; items met at a join must carry the same number, otherwise join_err
// latches.  A PE without inputs is a source: it issues sequence numbers
// 0, 1, 2, ... while run is high.  A PE without outputs is a sink: it pulses
// item_done for every item it completes.
//
// The PE produces the stall signals the stall monitors count.  cons_stall[i]
// is high while the PE is waiting for input i (it still needs an item from
// it) and that FIFO is empty; prod_stall[j] is high while the PE holds a
// result for output j and that FIFO is full.  A full or empty FIFO that the
// PE is not waiting on is not a stall.
//
// PRIMED_IN marks inputs on a feedback path: the first PRIME_ITEMS
// iterations do not read them, which stands for PRIME_ITEMS items already on
// that path, so that a loop of PEs does not deadlock.  Their items are not
// compared at the join.  PRIME_ITEMS must not exceed what the loop's FIFOs
// and PEs can hold, or the loop fills up before the first primed read.
//
// Timing per item without stalls: one read cycle, WORK_CYCLES work cycles,
// one write cycle (a source skips the read cycle, a sink the write cycle).
// Reads and writes use the FIFO handshakes directly: read is raised only
// when the FIFO is not empty, write only when it is not full.
module pe_model #(
  parameter int unsigned N_IN        = 1,
  parameter int unsigned N_OUT       = 1,
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned WORK_CYCLES = 8,
  parameter logic [31:0] PRIMED_IN   = '0,
  parameter int unsigned PRIME_ITEMS = 1,
  localparam int unsigned NI         = (N_IN  > 0) ? N_IN  : 1,
  localparam int unsigned NO         = (N_OUT > 0) ? N_OUT : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,          // source only: keep issuing items

  input  logic             in_empty   [NI],
  input  logic [WIDTH-1:0] in_data    [NI],
  output logic             in_read    [NI],
  output logic             cons_stall [NI],

  input  logic             out_full   [NO],
  output logic             out_write  [NO],
  output logic [WIDTH-1:0] out_data,
  output logic             prod_stall [NO],

  output logic             item_done,    // pulse: one item completed
  output logic [WIDTH-1:0] item_data,
  output logic             join_err
);

  typedef enum logic [1:0] {S_READ, S_WORK, S_WRITE} pe_state_e;

  localparam int unsigned WC_W = $clog2(WORK_CYCLES + 1);

  pe_state_e        state;
  logic [NI-1:0]    need;       // inputs still to be read this iteration
  logic [NO-1:0]    pending;    // outputs still to be written this iteration
  logic [WC_W-1:0]  work_cnt;
  logic [WIDTH-1:0] data_q;     // item being processed
  logic [WIDTH-1:0] join_ref;   // first non-primed value read this iteration
  logic             join_ref_ok;
  logic [WIDTH-1:0] seq;        // source sequence number
  logic [15:0]      primed_left;  // iterations that still skip primed inputs

  function automatic logic [NI-1:0] need_mask(input logic first);
    logic [NI-1:0] m;
    for (int i = 0; i < NI; i++) m[i] = !(first && PRIMED_IN[i]);
    return m;
  endfunction

  // Handshakes and stalls.
  always_comb begin
    for (int i = 0; i < NI; i++) begin
      in_read[i]    = (N_IN > 0) && state == S_READ && need[i] && !in_empty[i];
      cons_stall[i] = (N_IN > 0) && state == S_READ && need[i] &&  in_empty[i];
    end
    for (int j = 0; j < NO; j++) begin
      out_write[j]  = (N_OUT > 0) && state == S_WRITE && pending[j] && !out_full[j];
      prod_stall[j] = (N_OUT > 0) && state == S_WRITE && pending[j] &&  out_full[j];
    end
  end

  assign out_data  = data_q;
  assign item_data = data_q;

  // Inputs read this cycle, and the inputs still missing afterwards.
  logic [NI-1:0] reading;
  always_comb begin
    for (int i = 0; i < NI; i++) reading[i] = in_read[i];
  end

  logic [NO-1:0] writing;
  always_comb begin
    for (int j = 0; j < NO; j++) writing[j] = out_write[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= (N_IN > 0) ? S_READ : S_WORK;
      need        <= need_mask(PRIME_ITEMS != 0);
      primed_left <= 16'(PRIME_ITEMS);
      pending     <= '0;
      work_cnt    <= '0;
      data_q      <= '0;
      join_ref    <= '0;
      join_ref_ok <= 1'b0;
      seq         <= '0;
      item_done   <= 1'b0;
      join_err    <= 1'b0;
    end else begin
      item_done <= 1'b0;
      unique case (state)
        S_READ: begin
          // Capture input 0 as the item, compare the other inputs with the
          // first non-primed value seen.
          logic          ref_ok;
          logic [WIDTH-1:0] ref_v;
          ref_ok = join_ref_ok;
          ref_v  = join_ref;
          for (int i = 0; i < NI; i++) begin
            if (reading[i]) begin
              if (i == 0) data_q <= in_data[i];
              if (!PRIMED_IN[i]) begin
                if (ref_ok && in_data[i] != ref_v) join_err <= 1'b1;
                if (!ref_ok) begin
                  ref_ok = 1'b1;
                  ref_v  = in_data[i];
                end
              end
            end
          end
          join_ref    <= ref_v;
          join_ref_ok <= ref_ok;
          need        <= need & ~reading;
          if ((need & ~reading) == '0) begin
            state    <= S_WORK;
            work_cnt <= '0;
          end
        end
        S_WORK: begin
          if (N_IN > 0 || run) begin
            if (work_cnt == WC_W'(WORK_CYCLES - 1)) begin
              if (N_IN == 0) begin
                data_q <= seq;
                seq    <= seq + 1'b1;
              end
              if (N_OUT > 0) begin
                state   <= S_WRITE;
                pending <= '1;
              end else begin
                item_done   <= 1'b1;
                state       <= S_READ;
                need        <= need_mask(primed_left > 1);
                if (primed_left != 0) primed_left <= primed_left - 1'b1;
                join_ref_ok <= 1'b0;
              end
            end else begin
              work_cnt <= work_cnt + 1'b1;
            end
          end
        end
        S_WRITE: begin
          pending <= pending & ~writing;
          if ((pending & ~writing) == '0) begin
            item_done   <= 1'b1;
            need        <= need_mask(primed_left > 1);
            if (primed_left != 0) primed_left <= primed_left - 1'b1;
            join_ref_ok <= 1'b0;
            work_cnt    <= '0;
            state       <= (N_IN > 0) ? S_READ : S_WORK;
          end
        end
        default: state <= S_READ;
      endcase
    end
  end

endmodule
