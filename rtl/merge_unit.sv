// merge_unit: two-way merge element of the sorting accelerator.
//
// Two ascending key streams A and B are merged into one ascending stream at
// one key per cycle. A stream offers a key with x_valid; x_done says the
// stream has no more keys at all (its run is exhausted). While both streams
// still have keys, the unit must see both heads before it can choose, so it
// waits for both valids; once one stream is done the other passes straight
// through. On ties A goes first, which keeps the merge stable. all_done
// says both streams are exhausted, i.e. the merged run is complete. The unit is combinational: the
// chosen stream's x_ready is high in the cycle its key is taken. The
// surrounding block buffers and memory traffic are in sort_unit.
module merge_unit #(
  parameter int unsigned W = 64
) (
  input  logic         a_valid,
  input  logic         a_done,
  input  logic [W-1:0] a_data,
  output logic         a_ready,
  input  logic         b_valid,
  input  logic         b_done,
  input  logic [W-1:0] b_data,
  output logic         b_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  output logic         all_done
);
  logic take_a, take_b;

  always_comb begin
    take_a = 1'b0;
    take_b = 1'b0;
    if (a_valid && b_valid)       begin take_a = (a_data <= b_data); take_b = !take_a; end
    else if (a_valid && b_done)   take_a = 1'b1;
    else if (b_valid && a_done)   take_b = 1'b1;
    out_valid = take_a || take_b;
    out_data  = take_a ? a_data : b_data;
    a_ready   = take_a && out_ready;
    b_ready   = take_b && out_ready;
    all_done  = a_done && b_done;
  end
endmodule
