// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Function: zi = xi, zj = xi ^ xj. The control input is copied to zi and
// the target is inverted when the control is 1, so the mapping from
// (xi, xj) to (zi, zj) is a bijection and no input information is lost.
//
// Structure: the XOR is decomposed into three 2-input cells with no
// inverter, XOR(x, y) = NAND(x, y) & OR(x, y). Removing the inverters of a
// sum-of-products XOR lowers the cell count from 5 to 3 and the summed
// switching activity from 1.0625 to 3 x 3/16 = 0.5625, which is the point of
// this low-power form. The gate counts and switching activity figures
// follow the published design; the particular NAND/OR/AND arrangement is
// this design's reading of a three-cell, inverter-free XOR.
//
// Interface: single-bit inputs xi, xj and outputs zi, zj.
// The pass-through output zi is a plain wire from xi; that is what the
// reversible gate defines, not a missing function.
// Timing: purely combinational, no clock and no reset.
module feynman_gate (
    input  logic xi,
    input  logic xj,
    output logic zi,
    output logic zj
);

    logic nand_ij;  // cell 1: NAND2
    logic or_ij;    // cell 2: OR2

    assign nand_ij = ~(xi & xj);
    assign or_ij   = xi | xj;

    assign zi = xi;
    assign zj = nand_ij & or_ij;  // cell 3: AND2

endmodule
