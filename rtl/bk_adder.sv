// bk_adder: WIDTH-bit Brent-Kung parallel-prefix adder, sum = a + b + cin.
//
// The adder is built in the three stages of the Brent-Kung structure:
//   1. generate/propagate: g = a & b, p = a ^ b per bit;
//   2. the dot operator (g,p) o (g',p') = (g | p & g', p & p') applied in an
//      up-sweep tree (spans 2, 4, 8, ...) and a down-sweep tree that fills the
//      remaining prefixes, giving about 2*log2(WIDTH) operator levels;
//   3. sum generation: s[i] = p[i] ^ c[i], with c[0] = cin.
// Purely combinational. WIDTH = 8 is the size drawn for this adder; the
// crossbar instantiates it at whatever width its operands need. Any WIDTH >= 1
// works: the prefix trees are generated for the next power of two and the
// unused upper bits are dropped.
module bk_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH <= 1) ? 1 : $clog2(WIDTH);
  localparam int unsigned PW     = 1 << LEVELS;

  // Stage 1: bit generate/propagate; bit 0 also absorbs the carry-in so the
  // prefix over bits [i:0] is directly the carry out of bit i.
  logic [PW-1:0] g0, p0;
  always_comb begin
    g0 = '0;
    p0 = '0;
    for (int i = 0; i < int'(WIDTH); i++) begin
      g0[i] = a[i] & b[i];
      p0[i] = a[i] ^ b[i];
    end
    g0[0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
  end

  // Stage 2: dot-operator prefix network.
  // gu/pu[l] : state after up-sweep level l (level 0 = input).
  logic [PW-1:0] gu [LEVELS+1];
  logic [PW-1:0] pu [LEVELS+1];
  logic [PW-1:0] gd [LEVELS+1];
  logic [PW-1:0] pd [LEVELS+1];

  always_comb begin
    gu[0] = g0;
    pu[0] = p0;
    // Up-sweep: node i at level l (span 2^l) combines with node i - 2^(l-1).
    for (int l = 1; l <= int'(LEVELS); l++) begin
      gu[l] = gu[l-1];
      pu[l] = pu[l-1];
      for (int i = 0; i < int'(PW); i++) begin
        if (((i + 1) % (1 << l)) == 0) begin
          gu[l][i] = gu[l-1][i] | (pu[l-1][i] & gu[l-1][i - (1 << (l-1))]);
          pu[l][i] = pu[l-1][i] & pu[l-1][i - (1 << (l-1))];
        end
      end
    end
    // Down-sweep: fill the prefixes the up-sweep left incomplete.
    gd[LEVELS] = gu[LEVELS];
    pd[LEVELS] = pu[LEVELS];
    for (int l = int'(LEVELS) - 1; l >= 1; l--) begin
      gd[l] = gd[l+1];
      pd[l] = pd[l+1];
      for (int i = 0; i < int'(PW); i++) begin
        if ((((i + 1) % (1 << l)) == (1 << (l-1))) && (i >= (1 << l))) begin
          gd[l][i] = gd[l+1][i] | (pd[l+1][i] & gd[l+1][i - (1 << (l-1))]);
          pd[l][i] = pd[l+1][i] & pd[l+1][i - (1 << (l-1))];
        end
      end
    end
    gd[0] = gd[1];
    pd[0] = pd[1];
  end

  // Stage 3: sum generation.
  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++)
      sum[i] = p0[i] ^ ((i == 0) ? cin : gd[0][i-1]);
    cout = gd[0][WIDTH-1];
  end

endmodule
