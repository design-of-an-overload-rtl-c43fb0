// oci_controller: crossbar controller, receiver-based spreading code
// assignment with arbitration.
//
// Every receive port d owns one fixed despreading code, code index d (see
// oci_pkg). At the start of a transaction a transmit port that wants to reach
// port d must be given code d. When several transmit ports address the same
// receive port, one is granted and the others wait for a later transaction;
// the priority is fixed, lowest transmit port index first (this design's
// choice of the predefined arbitration scheme).
//
// Overloading only decodes correctly when all N-1 Walsh codes are on the
// channel. So each orthogonal code that no granted port uses is handed to an
// idle (not granted) transmit port as a filler: that port's encoders spread a
// '0' data bit with it. There are always enough idle ports, because at most
// N-1 ports are granted overloading codes. Filler assignment is in port order.
//
// The assignment is combinational: outputs are valid in the cycle the requests
// are, and the crossbar registers them when it starts the transaction. Only
// the priority pointer is a register; it steps when advance is high.
module oci_controller #(
  parameter int unsigned N  = 8,                 // spreading code length
  parameter int unsigned M  = 2 * (N - 1),       // ports = codes
  parameter int unsigned DW = $clog2(M)          // destination / code index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,        // a transaction starts: rotate the priority
  input  logic          req_valid [M],  // head flit present at transmit port p
  input  logic [DW-1:0] req_dest  [M],  // its destination receive port
  output logic          grant     [M],  // port p sends its head flit this transaction
  output logic          enc_en    [M],  // port p's encoders hold a code
  output logic          enc_fill  [M],  // ... as an orthogonal filler (data forced to 0)
  output logic [DW-1:0] enc_code  [M],  // code index assigned to port p
  output logic          dest_valid[M],  // receive port d gets a flit this transaction
  output logic          any_grant
);

  logic          code_used [M];
  logic [DW-1:0] prio_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       prio_ptr <= '0;
    else if (advance) prio_ptr <= (32'(prio_ptr) == M - 1) ? '0 : prio_ptr + 1'b1;
  end

  always_comb begin
    for (int p = 0; p < int'(M); p++) begin
      grant[p]    = 1'b0;
      enc_en[p]   = 1'b0;
      enc_fill[p] = 1'b0;
      enc_code[p] = '0;
    end
    for (int d = 0; d < int'(M); d++) begin
      code_used[d]  = 1'b0;
      dest_valid[d] = 1'b0;
    end

    // Arbitration: per destination, the first requesting port in rotated
    // order prio_ptr, prio_ptr+1, ... wins.
    for (int k = 0; k < int'(M); k++) begin
      automatic int p = (int'(prio_ptr) + k) % int'(M);
      if (req_valid[p] && (32'(req_dest[p]) < M) && !code_used[req_dest[p]]) begin
        code_used[req_dest[p]]  = 1'b1;
        dest_valid[req_dest[p]] = 1'b1;
        grant[p]    = 1'b1;
        enc_en[p]   = 1'b1;
        enc_code[p] = req_dest[p];
      end
    end

    // Fillers: every unused orthogonal code goes to the next idle port.
    for (int c = 0; c < int'(N) - 1; c++) begin
      if (!code_used[c]) begin
        for (int p = 0; p < int'(M); p++) begin
          if (!code_used[c] && !enc_en[p]) begin
            code_used[c] = 1'b1;
            enc_en[p]    = 1'b1;
            enc_fill[p]  = 1'b1;
            enc_code[p]  = DW'(c);
          end
        end
      end
    end

    any_grant = 1'b0;
    for (int p = 0; p < int'(M); p++) any_grant |= grant[p];
  end

endmodule
