// udiv_serial: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start loads num and den; NUM_W clocks later done pulses for one
// cycle with quo = num / den and rem = num % den (both held until the next
// start). A start while busy is ignored. Division by zero gives an all-ones
// quotient. The Data Collector and the PDM use it for their IPC divisions;
// the document does not say how the division is done, the serial form is
// this design's choice (it has a whole 10k-cycle epoch to finish).
module udiv_serial #(
  parameter int unsigned NUM_W = 32,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo,
  output logic [DEN_W-1:0] rem
);
  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q_r;      // dividend bits shift out, quotient bits shift in
  logic [DEN_W-1:0] r_r;      // partial remainder
  logic [DEN_W-1:0] d_r;
  logic [CNT_W-1:0] cnt_r;

  logic [DEN_W:0] r_shift;
  logic [DEN_W:0] r_sub;
  always_comb begin
    r_shift = {r_r, q_r[NUM_W-1]};
    r_sub   = r_shift - {1'b0, d_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r   <= '0;
      r_r   <= '0;
      d_r   <= '0;
      cnt_r <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q_r   <= num;
          r_r   <= '0;
          d_r   <= den;
          cnt_r <= CNT_W'(NUM_W);
          busy  <= 1'b1;
        end
      end else begin
        if (!r_sub[DEN_W]) begin
          r_r <= r_sub[DEN_W-1:0];
          q_r <= {q_r[NUM_W-2:0], 1'b1};
        end else begin
          r_r <= r_shift[DEN_W-1:0];
          q_r <= {q_r[NUM_W-2:0], 1'b0};
        end
        cnt_r <= cnt_r - 1'b1;
        if (cnt_r == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = q_r;
  assign rem = r_r;
endmodule
