// Reference rules of the coin exchange machine, used by the testbenches.
// Payout items are numbered 0..7 for 500, 200, 100, 50, 20, 10, 5, 1 NOK, and
// coin types 0..3 for 1, 5, 10, 20 NOK.
package exchange_ref_pkg;

  localparam int PAY_VALUE[8]  = '{500, 200, 100, 50, 20, 10, 5, 1};
  localparam int COIN_VALUE[4] = '{1, 5, 10, 20};

  // The item to dispense next: bills while the amount reaches them, then the
  // largest held coin the amount reaches, 1 NOK last; -1 when nothing is owed.
  function automatic int next_item(int amount, int c20, int c10, int c05);
    for (int k = 0; k < 4; k++) if (amount >= PAY_VALUE[k]) return k;
    if (amount >= 20 && c20 > 0) return 4;
    if (amount >= 10 && c10 > 0) return 5;
    if (amount >= 5  && c05 > 0) return 6;
    if (amount >= 1) return 7;
    return -1;
  endfunction

  // Coin type to a one-hot {in20, in10, in05, in01}.
  function automatic logic [3:0] coin_onehot(int t);
    return 4'(1 << t);
  endfunction

endpackage
