// toffoli_gate_tb: exhaustive self-checking test of the Toffoli gate.
//
// Applies all eight input patterns, one per clock of a testbench-only clock,
// and compares (zi, zj, zk) with the gate's truth table written out as a
// constant. It also checks that the eight output patterns are all different
// (reversibility) and that a second Toffoli gate placed behind the first gives
// back the original inputs (the gate is its own inverse).
// A watchdog ends the run with a failure if it has not finished in 100 cycles.
module toffoli_gate_tb;

    logic clk = 1'b0;
    always #5 clk = ~clk;

    int checks   = 0;
    int failures = 0;

    logic xi, xj, xk;
    logic zi, zj, zk;
    logic ri, rj, rk;

    toffoli_gate dut (.xi(xi), .xj(xj), .xk(xk), .zi(zi), .zj(zj), .zk(zk));
    toffoli_gate inv (.xi(zi), .xj(zj), .xk(zk), .zi(ri), .zj(rj), .zk(rk));

    // Truth table, index {xi, xj, xk}: only 110 and 111 swap.
    localparam logic [2:0] EXPECT [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                          3'b100, 3'b101, 3'b111, 3'b110};

    task automatic check(input bit cond, input string what);
        checks++;
        if (!cond) begin
            failures++;
            $display("FAIL: %s (x=%0b%0b%0b z=%0b%0b%0b)", what, xi, xj, xk, zi, zj, zk);
        end
    endtask

    initial begin
        bit [7:0] seen;
        seen = '0;
        for (int v = 0; v < 8; v++) begin
            @(negedge clk);
            {xi, xj, xk} = 3'(v);
            #1;
            check({zi, zj, zk} == EXPECT[v], "truth table");
            check({ri, rj, rk} == 3'(v), "self-inverse");
            check(!seen[{zi, zj, zk}], "output pattern unique");
            seen[{zi, zj, zk}] = 1'b1;
        end
        check(seen == 8'hFF, "all output patterns reached");
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
