// json_ref: testbench-only JSON reference checker and random JSON generator.
//
// ref_valid() is a recursive-descent parser written directly from the JSON
// grammar (RFC 8259), independent of the automaton under test. It returns 1
// when the string is exactly one JSON value with optional surrounding white
// space and no nesting deeper than max_depth. gen_value() builds random valid
// JSON with the kinds of content a fuzzer produces: objects, arrays, strings
// with escapes, numbers in every form and the three literals.
package json_ref;

  string s;
  int    p;
  int    lim;

  function automatic bit at_end();
    return p >= s.len();
  endfunction

  function automatic byte peek();
    return at_end() ? 8'h00 : s[p];
  endfunction

  function automatic void skip_ws();
    while (!at_end() && (s[p] == " " || s[p] == "\t" || s[p] == "\n" || s[p] == "\r")) p++;
  endfunction

  function automatic bit dig(byte c);
    return c >= "0" && c <= "9";
  endfunction

  function automatic bit hexd(byte c);
    return dig(c) || (c >= "a" && c <= "f") || (c >= "A" && c <= "F");
  endfunction

  function automatic bit p_string();
    if (peek() != "\"") return 0;
    p++;
    forever begin
      byte c;
      if (at_end()) return 0;
      c = s[p]; p++;
      if (c == "\"") return 1;
      if (c >= 0 && c < 8'h20) return 0;
      if (c == "\\") begin
        if (at_end()) return 0;
        c = s[p]; p++;
        if (c == "u") begin
          for (int i = 0; i < 4; i++) begin
            if (at_end() || !hexd(s[p])) return 0;
            p++;
          end
        end else if (!(c == "\"" || c == "\\" || c == "/" || c == "b" || c == "f" ||
                       c == "n" || c == "r" || c == "t")) return 0;
      end
    end
  endfunction

  function automatic bit p_number();
    if (peek() == "-") p++;
    if (peek() == "0") p++;
    else if (dig(peek())) while (dig(peek())) p++;
    else return 0;
    if (peek() == ".") begin
      p++;
      if (!dig(peek())) return 0;
      while (dig(peek())) p++;
    end
    if (peek() == "e" || peek() == "E") begin
      p++;
      if (peek() == "+" || peek() == "-") p++;
      if (!dig(peek())) return 0;
      while (dig(peek())) p++;
    end
    return 1;
  endfunction

  function automatic bit p_word(string w);
    for (int i = 0; i < w.len(); i++) begin
      if (at_end() || s[p] != w[i]) return 0;
      p++;
    end
    return 1;
  endfunction

  function automatic bit p_value(int depth);
    byte c;
    skip_ws();
    c = peek();
    if (at_end()) return 0;
    if (c == "{") begin
      if (depth + 1 > lim) return 0;
      p++; skip_ws();
      if (peek() == "}") begin p++; return 1; end
      forever begin
        skip_ws();
        if (!p_string()) return 0;
        skip_ws();
        if (peek() != ":") return 0;
        p++;
        if (!p_value(depth + 1)) return 0;
        skip_ws();
        if (peek() == ",") p++;
        else if (peek() == "}") begin p++; return 1; end
        else return 0;
      end
    end else if (c == "[") begin
      if (depth + 1 > lim) return 0;
      p++; skip_ws();
      if (peek() == "]") begin p++; return 1; end
      forever begin
        if (!p_value(depth + 1)) return 0;
        skip_ws();
        if (peek() == ",") p++;
        else if (peek() == "]") begin p++; return 1; end
        else return 0;
      end
    end else if (c == "\"") return p_string();
    else if (c == "t") return p_word("true");
    else if (c == "f") return p_word("false");
    else if (c == "n") return p_word("null");
    else return p_number();
  endfunction

  function automatic bit ref_valid(string str, int max_depth);
    s = str; p = 0; lim = max_depth;
    if (!p_value(0)) return 0;
    skip_ws();
    return at_end();
  endfunction

  // ---------------------------------------------------------------- generator
  function automatic string gen_ws();
    case ($urandom_range(0, 7))
      0: return " ";
      1: return "\n  ";
      default: return "";
    endcase
  endfunction

  function automatic string gen_string();
    string r;
    int n;
    r = "\"";
    n = $urandom_range(0, 9);
    for (int i = 0; i < n; i++) begin
      case ($urandom_range(0, 11))
        0: r = {r, "\\n"};
        1: r = {r, "\\\""};
        2: r = {r, "\\u00e9"};
        3: r = {r, "\\\\"};
        default: begin
          byte c;
          c = byte'($urandom_range(0, 61));
          c = (c < 10) ? byte'("0" + c) : (c < 36) ? byte'("a" + c - 10) : byte'("A" + c - 36);
          r = {r, string'(c)};
        end
      endcase
    end
    return {r, "\""};
  endfunction

  function automatic string gen_number();
    string r;
    r = $urandom_range(0, 1) ? "-" : "";
    if ($urandom_range(0, 4) == 0) r = {r, "0"};
    else r = {r, $sformatf("%0d", $urandom_range(1, 99999))};
    if ($urandom_range(0, 1)) r = {r, $sformatf(".%0d", $urandom_range(0, 999999))};
    if ($urandom_range(0, 3) == 0)
      r = {r, $urandom_range(0, 1) ? "e" : "E", $urandom_range(0, 1) ? "-" : "",
           $sformatf("%0d", $urandom_range(0, 30))};
    return r;
  endfunction

  // depth: containers already open; target: containers still to nest down.
  function automatic string gen_value(int depth, int target);
    string r;
    int n;
    if (target > 0) begin
      n = $urandom_range(1, 4);
      if ($urandom_range(0, 1)) begin
        r = "{";
        for (int i = 0; i < n; i++) begin
          r = {r, gen_ws(), gen_string(), gen_ws(), ":", gen_ws(),
               gen_value(depth + 1, (i == 0) ? target - 1 : $urandom_range(0, target - 1) / 2),
               gen_ws(), (i == n - 1) ? "" : ","};
        end
        return {r, "}"};
      end else begin
        r = "[";
        for (int i = 0; i < n; i++) begin
          r = {r, gen_ws(), gen_value(depth + 1, (i == 0) ? target - 1 : $urandom_range(0, target - 1) / 2),
               gen_ws(), (i == n - 1) ? "" : ","};
        end
        return {r, "]"};
      end
    end
    case ($urandom_range(0, 6))
      0: return "true";
      1: return "false";
      2: return "null";
      3, 4: return gen_string();
      5: return "{}";
      default: return gen_number();
    endcase
  endfunction

  // Maximum container nesting of a valid JSON text (brackets outside strings).
  function automatic int nesting(string str);
    int d, m;
    bit in_s, esc;
    d = 0; m = 0; in_s = 0; esc = 0;
    for (int i = 0; i < str.len(); i++) begin
      byte c;
      c = str[i];
      if (in_s) begin
        if (esc) esc = 0;
        else if (c == "\\") esc = 1;
        else if (c == "\"") in_s = 0;
      end else if (c == "\"") in_s = 1;
      else if (c == "{" || c == "[") begin d++; if (d > m) m = d; end
      else if (c == "}" || c == "]") d--;
    end
    return m;
  endfunction

endpackage
