// tmr_voter: triple-modular-redundancy voter with error detection.
//
// Takes the same W-bit word from three copies of a processing element and
// returns the bitwise majority (`voted`). `mismatch` is high when the copies
// do not all agree, and `faulty[i]` flags the copy i that disagrees with
// the majority. `voted` also serves as the resynchronisation value: fed back
// as the state of every copy, it overwrites the upset copy on the next clock,
// so a single upset does not persist. Purely combinational.
//
// From the document: three instances of a processing element, a majority
// voter on their outputs, error detection/correction and a state
// resynchronisation path. The bitwise 2-of-3 vote and per-copy flags are
// this design's choice.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  output logic [W-1:0] voted,
  output logic         mismatch,
  output logic [2:0]   faulty
);
  always_comb begin
    voted     = (in1 & in2) | (in1 & in3) | (in2 & in3);
    faulty[0] = (in1 != voted);
    faulty[1] = (in2 != voted);
    faulty[2] = (in3 != voted);
    mismatch  = |faulty;
  end
endmodule
