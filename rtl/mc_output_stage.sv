// mc_output_stage: output side of one merge core of step 2.
//
// The merged stream of core r holds, in key order, the partial results of
// every intermediate vector v^k for the rows with radix r; the same row may
// appear once per stripe. The accumulator adds consecutive records of equal
// key (single-precision adder) and releases a row when a different key or
// the end marker follows.
//
// The missing-key check then makes the stream dense. Core r must deliver
// exactly the rows r, r+p, r+2p, ... below num_rows. A row absent from every
// v^k is inserted as {row, 0} ahead of the next real record, which waits, and
// 'inserted' pulses. After the end marker the remaining rows are inserted up
// to num_rows. Every core thus delivers the same number of records at one per
// cycle, which keeps the parallel cores balanced and in step at the store
// queue. 'done' rises after the last row; 'start' rearms the stage with
// 'radix' and 'num_rows'.
//
// Inserting missing keys with value 0 follows the document. Summing equal
// keys in front of the check is this design's reading of the accumulation in
// step 2. num_rows is sampled at 'start' and must be a multiple of p (this
// design's restriction).
module mc_output_stage
  import spmv_pkg::*;
#(
  parameter int unsigned Q = 4,
  localparam int unsigned NP = 1 << Q
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] radix,
  input  key_t         num_rows,
  input  logic         in_valid,
  output logic         in_ready,
  input  rec_t         in_rec,
  output logic         out_valid,
  input  logic         out_ready,
  output rec_t         out_rec,
  output logic         inserted,
  output logic         done
);
  logic acc_valid, s_done;
  key_t acc_key, expk, nrows;
  val_t acc_val, sum;
  logic in_end, same, s_valid, s_fire, take_real;
  logic exp_left;

  fp32_add u_add (.a(acc_val), .b(in_rec.val), .y(sum));

  assign in_end   = in_valid && in_rec.key == KEY_END;
  assign same     = acc_valid && in_valid && !in_end && in_rec.key == acc_key;
  // accumulated row is final once a different key (or the end) shows up
  assign s_valid  = acc_valid && in_valid && !same;
  assign exp_left = (64'(expk) < 64'(nrows));

  always_comb begin
    out_valid = 1'b0;
    out_rec   = '{key: expk, val: '0};
    take_real = 1'b0;
    inserted  = 1'b0;
    if (s_valid) begin
      out_valid = 1'b1;
      if (acc_key == expk) begin
        out_rec   = '{key: acc_key, val: acc_val};
        take_real = 1'b1;
      end else inserted = out_ready;
    end else if (s_done && exp_left) begin
      out_valid = 1'b1;
      inserted  = out_ready;
    end
    s_fire   = out_valid && out_ready && take_real;
    // take a record from the merge core (the end marker is never taken)
    in_ready = !in_end && (!acc_valid || same || s_fire);
  end

  assign done = s_done && !exp_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_valid <= 1'b0;
      acc_key   <= '0;
      acc_val   <= '0;
      s_done    <= 1'b0;
      expk      <= '0;
      nrows     <= '0;
    end else if (start) begin
      nrows     <= num_rows;
      acc_valid <= 1'b0;
      s_done    <= 1'b0;
      expk      <= key_t'(radix);
    end else begin
      if (out_valid && out_ready) expk <= expk + key_t'(NP);
      if (in_valid && in_ready) begin
        if (same) acc_val <= sum;
        else begin
          acc_valid <= 1'b1;
          acc_key   <= in_rec.key;
          acc_val   <= in_rec.val;
        end
      end else if (s_fire) begin
        acc_valid <= 1'b0;
      end
      if (in_end && !acc_valid && !s_done) s_done <= 1'b1;
    end
  end
endmodule
