// publish_scheduler: issues the periodic market-data snapshot.
//
// Every PERIOD clock cycles (default: twice a second at 160 MHz) it walks
// all NUM_TABLES book sides in table order and requests one publish
// (top-of-book levels) for each, one request per handshake. If a new period
// starts before a walk has finished, the walk simply continues and the next
// one starts when it ends; no period is queued twice.
//
// Interface: enable gates the timer; req_valid/req_ready is the request
// handshake toward the message arbiter, req_table the book side (book =
// req_table / 2, side = req_table % 2).
//
// The twice-a-second snapshot of the top portion of every book is the
// source's; the timer and the walk order are this design's choices.
module publish_scheduler #(
  parameter int NUM_TABLES = 400,
  parameter int PERIOD     = 80_000_000,
  parameter int TBL_W      = (NUM_TABLES <= 2) ? 1 : $clog2(NUM_TABLES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic             req_valid,
  input  logic             req_ready,
  output logic [TBL_W-1:0] req_table
);

  localparam int PW = (PERIOD <= 2) ? 1 : $clog2(PERIOD);

  logic [PW-1:0] timer;
  logic          due;       // a period ended and its walk has not started

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      due       <= 1'b0;
      req_valid <= 1'b0;
      req_table <= '0;
    end else begin
      if (enable) begin
        if (timer == PW'(PERIOD - 1)) begin
          timer <= '0;
          due   <= 1'b1;
        end else begin
          timer <= timer + 1'b1;
        end
      end
      if (req_valid && req_ready) begin
        if (req_table == TBL_W'(NUM_TABLES - 1)) begin
          req_valid <= 1'b0;
          req_table <= '0;
        end else begin
          req_table <= req_table + 1'b1;
        end
      end else if (!req_valid && due) begin
        req_valid <= 1'b1;
        due       <= 1'b0;
      end
    end
  end

endmodule
