// feynman_gate_tb: exhaustive self-checking test of the Feynman gate.
//
// Applies all four input pairs, one per clock of a testbench-only clock, and
// compares (zi, zj) with the gate's truth table written out as a constant.
// It also checks that the four output pairs are all different (the gate is
// reversible) and that a second Feynman gate placed behind the first gives
// back the original inputs (the gate is its own inverse).
// A watchdog ends the run with a failure if it has not finished in 100 cycles.
module feynman_gate_tb;

    logic clk = 1'b0;
    always #5 clk = ~clk;

    int checks   = 0;
    int failures = 0;

    logic xi, xj;
    logic zi, zj;
    logic ri, rj;

    feynman_gate dut (.xi(xi), .xj(xj), .zi(zi), .zj(zj));
    feynman_gate inv (.xi(zi), .xj(zj), .zi(ri), .zj(rj));

    // Truth table, index {xi, xj}, entry {zi, zj}: 00->00, 01->01, 10->11, 11->10
    localparam logic [1:0] EXPECT [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

    task automatic check(input bit cond, input string what);
        checks++;
        if (!cond) begin
            failures++;
            $display("FAIL: %s (xi=%0b xj=%0b zi=%0b zj=%0b)", what, xi, xj, zi, zj);
        end
    endtask

    initial begin
        bit [3:0] seen;
        seen = '0;
        for (int v = 0; v < 4; v++) begin
            @(negedge clk);
            {xi, xj} = 2'(v);
            #1;
            check({zi, zj} == EXPECT[v], "truth table");
            check({ri, rj} == 2'(v), "self-inverse");
            check(!seen[{zi, zj}], "output pattern unique");
            seen[{zi, zj}] = 1'b1;
        end
        check(seen == 4'hF, "all output patterns reached");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        repeat (100) @(posedge clk);
        failures++;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

endmodule
